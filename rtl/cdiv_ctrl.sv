// Controller of the complex divider.
//
// One operation is a fixed sequence of clock-enable phases:
//   LOOKUP  LOOKUP_CYC cycles; en_pres in the last one stores K
//   SCALE_Z SCALE_CYC cycles, sel_mul = 1; en_sc in the last one stores x
//   SCALE_D SCALE_CYC cycles, sel_mul = 0; init_res in the first one copies
//           x into the residuals, en_sc in the last one stores y
//   ITER    ITERS cycles with en_res: one radix-4 digit per cycle
//   DONE    one cycle with done = 1; the quotient is then stable
// A start seen in IDLE or DONE latches the operands (en_inputs) on the same
// edge, so operations can follow back to back.
// From that edge the result is valid after
// LOOKUP_CYC + 2*SCALE_CYC + ITERS clocks (3 + 8 + 16 = 27 by default).
// Long phases let the look-up and the multipliers work as multi-cycle paths.
// The phase order and cycle counts follow the published timing; the state
// encoding, the done pulse and the reset are this design's choices.
module cdiv_ctrl
  import cdiv_pkg::*;
#(
  parameter int unsigned ITERS      = 16,
  parameter int unsigned LOOKUP_N   = LOOKUP_CYC,
  parameter int unsigned SCALE_N    = SCALE_CYC
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en_inputs,
  output logic en_pres,
  output logic sel_mul,
  output logic en_sc,
  output logic init_res,
  output logic en_res,
  output logic iter,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_SCALE_Z, S_SCALE_D, S_ITER, S_DONE} state_t;

  state_t     state;
  logic [7:0] cnt;
  logic       last;

  always_comb begin
    unique case (state)
      S_LOOKUP:            last = (cnt == 8'(LOOKUP_N - 1));
      S_SCALE_Z, S_SCALE_D: last = (cnt == 8'(SCALE_N - 1));
      S_ITER:              last = (cnt == 8'(ITERS - 1));
      default:             last = 1'b1;
    endcase
    en_inputs = (state == S_IDLE || state == S_DONE) && start;
    en_pres   = (state == S_LOOKUP) && last;
    sel_mul   = (state == S_SCALE_Z);
    en_sc     = (state == S_SCALE_Z || state == S_SCALE_D) && last;
    init_res  = (state == S_SCALE_D) && (cnt == 8'd0);
    iter      = (state == S_ITER);
    en_res    = init_res || iter;
    busy      = (state != S_IDLE) && (state != S_DONE);
    done      = (state == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      cnt <= last ? 8'd0 : cnt + 8'd1;
      unique case (state)
        S_IDLE:    if (start) state <= S_LOOKUP;
        S_LOOKUP:  if (last) state <= S_SCALE_Z;
        S_SCALE_Z: if (last) state <= S_SCALE_D;
        S_SCALE_D: if (last) state <= S_ITER;
        S_ITER:    if (last) state <= S_DONE;
        S_DONE:    state <= start ? S_LOOKUP : S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  // The phase lengths must fit the counter.
  initial begin
    assert (ITERS >= 1 && ITERS <= 255 && LOOKUP_N >= 2 && SCALE_N >= 1)
      else $error("cdiv_ctrl: unsupported cycle counts");
  end

endmodule
