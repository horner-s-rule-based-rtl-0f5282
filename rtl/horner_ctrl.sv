// horner_ctrl: sequencer shared by all Horner's-rule multipliers.
//
// A modular multiplier based on Horner's rule repeats one iteration stage
// R[i] = (R[i+1] << 1 + a_i*B) mod F a fixed number of times, keeping R in a
// register.  This block times that loop.  A start pulse seen while idle
// produces `load` in the same cycle (the multiplier captures its operands
// and clears R), then PRE preprocessing cycles (`pre` high, used by the
// radix-2 multipliers to build their reduction table), then ITERS cycles with
// `step` high (one Horner iteration each), then one cycle with `done` high.
//
// Timing: if start is sampled at clock edge 0, the last iteration happens at
// edge PRE+ITERS and `done` is high during the following cycle, so the
// latency measured in clock edges from start to done is PRE+ITERS.  Start is
// ignored while busy.  `idx` counts the steps already taken (0 on the first).
// The split into load / preprocessing / iterations follows the timing
// diagrams of the radix-2 designs; the start/busy/done handshake itself is a
// choice of this design.
module horner_ctrl #(
  parameter int unsigned ITERS = 32,
  parameter int unsigned PRE   = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic pre,
  output logic step,
  output logic [$clog2(PRE+ITERS+1)-1:0] idx,
  output logic busy,
  output logic done
);
  localparam int unsigned TOTAL = PRE + ITERS;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_t;
  state_t state;
  logic [CW-1:0] cnt;

  assign load = (state != S_RUN) && start;
  assign pre  = (state == S_RUN) && (cnt < CW'(PRE));
  assign step = (state == S_RUN) && (cnt >= CW'(PRE));
  assign idx  = cnt - CW'(PRE);
  assign busy = (state == S_RUN);
  assign done = (state == S_FIN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_FIN: begin
          if (start) begin
            state <= S_RUN;
            cnt   <= '0;
          end else begin
            state <= S_IDLE;
          end
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(TOTAL - 1)) state <= S_FIN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse and never coincides with an iteration.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n) done |-> !step && !pre);
endmodule
