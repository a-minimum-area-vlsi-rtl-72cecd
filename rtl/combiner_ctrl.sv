// combiner_ctrl: instruction sequencer of one (m,t)-combiner.
//
// All merging modules and trees of a combiner run in lockstep; this FSM
// issues the instruction (op, dim) they share, following the COMBINATION
// algorithm phase by phase:
//
//   LOAD_L, COPY_DIAG, LOAD_R                      phase A, 3 cycles
//   REVERSE E_0..E_tau-1, MERGE E_tau..E_0,
//   RANK_INIT, RETRACE E_0..E_tau                  phase B, 3*tau+3 cycles
//   SUM (wait for the row trees), LOAD_TOT         phase C, 1 + wait + 1
//   CONC E_0..E_tau-1, EXP E_tau-1..E_0,
//   TRANSFER, OUTPUT                               phase D, 2*tau+2 cycles
//
// then `done` for one cycle. `start` is taken only while idle (`busy` low).
// A step costs one clock; the row-tree wait is measured by `sum_done`.
module combiner_ctrl
  import csort_pkg::*;
#(
  parameter int unsigned TAU = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sum_done,
  output op_e              op,
  output logic [DIM_W-1:0] dim,
  output logic             sum_start,
  output logic             busy,
  output logic             done
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD_L, S_COPY, S_LOAD_R, S_REV, S_MERGE, S_RINIT, S_RETR,
    S_SUM, S_SUMWAIT, S_LTOT, S_CONC, S_EXP, S_XFER, S_OUT, S_DONE
  } state_e;

  state_e           st;
  logic [DIM_W-1:0] d;

  localparam logic [DIM_W-1:0] TOP = DIM_W'(TAU);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      d  <= '0;
    end else begin
      unique case (st)
        S_IDLE:   if (start) st <= S_LOAD_L;
        S_LOAD_L: st <= S_COPY;
        S_COPY:   st <= S_LOAD_R;
        S_LOAD_R: begin
          d  <= (TAU == 0) ? TOP : '0;
          st <= (TAU == 0) ? S_MERGE : S_REV;
        end
        S_REV:    if (d == TOP - 1'b1) begin d <= TOP; st <= S_MERGE; end
                  else d <= d + 1'b1;
        S_MERGE:  if (d == '0) st <= S_RINIT;
                  else d <= d - 1'b1;
        S_RINIT:  begin d <= '0; st <= S_RETR; end
        S_RETR:   if (d == TOP) st <= S_SUM;
                  else d <= d + 1'b1;
        S_SUM:    st <= S_SUMWAIT;
        S_SUMWAIT: if (sum_done) st <= S_LTOT;
        S_LTOT:   begin
          d  <= '0;
          st <= (TAU == 0) ? S_XFER : S_CONC;
        end
        S_CONC:   if (d == TOP - 1'b1) st <= S_EXP;
                  else d <= d + 1'b1;
        S_EXP:    if (d == '0) st <= S_XFER;
                  else d <= d - 1'b1;
        S_XFER:   st <= S_OUT;
        S_OUT:    st <= S_DONE;
        S_DONE:   st <= S_IDLE;
        default:  st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    dim       = d;
    sum_start = (st == S_SUM);
    busy      = (st != S_IDLE);
    done      = (st == S_DONE);
    unique case (st)
      S_LOAD_L: op = OP_LOAD_L;
      S_COPY:   op = OP_COPY_DIAG;
      S_LOAD_R: op = OP_LOAD_R;
      S_REV:    op = OP_REVERSE;
      S_MERGE:  op = OP_MERGE;
      S_RINIT:  op = OP_RANK_INIT;
      S_RETR:   op = OP_RETRACE;
      S_SUM, S_SUMWAIT: op = OP_SUM;
      S_LTOT:   op = OP_LOAD_TOT;
      S_CONC:   op = OP_CONC;
      S_EXP:    op = OP_EXP;
      S_XFER:   op = OP_TRANSFER;
      S_OUT:    op = OP_OUTPUT;
      default:  op = OP_NOP;
    endcase
  end

endmodule
