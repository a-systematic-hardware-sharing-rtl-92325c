// h264_transform_unit: registered wrapper around the unified H.264 transform
// datapath; it computes any of the six H.264 transforms (2x2 and 4x4
// Hadamard, 4x4 forward and inverse integer, 8-point forward and inverse
// integer) on one shared adder/subtractor network.
//
// How it works: an accepted block (in_valid && in_ready) is written into the
// input register together with its transform select. The combinational
// datapath (ua_datapath) transforms it and the result is captured in the
// output register on the next clock edge. 4x4 transforms produce their 16
// results in two passes of 8; the unit holds the block for a second cycle,
// flips the pass bit, and takes the next block only when the last pass is
// running, so blocks stream without bubbles. Sustained rates: 8 results per
// cycle for the 8-point and 4x4 transforms, 4 per cycle for the 2x2 Hadamard.
//
// Interface:
//   in_valid/in_ready  accept handshake; in_mode and in_x must stay stable
//                      while in_valid is high and in_ready low.
//   in_x[16]           block samples, layout per mode as in ua_datapath.
//   out_valid          one cycle per pass; out_f[8] are the results of pass
//                      out_pass of a block in mode out_mode.
// Timing: a block accepted at clock edge k gives its pass-0 results after
// edge k+1 and, for 4x4 modes, its pass-1 results after edge k+2. There is no
// output back-pressure: out_* are valid for exactly one cycle.
// Reset (rst_n low, synchronous) empties the unit.
//
// The datapath follows the published unified architecture (no registers
// inside, one cycle per pass); the input/output registers, the handshake and
// the pass sequencing are this design's own.
module h264_transform_unit
  import h264_tx_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  mode_t                in_mode,
  input  logic signed [W-1:0]  in_x [NX],
  output logic                 out_valid,
  output mode_t                out_mode,
  output logic                 out_pass,
  output logic signed [W-1:0]  out_f [NF]
);

  logic                 busy;
  logic                 pass_q;
  mode_t                mode_q;
  logic signed [W-1:0]  x_q [NX];
  logic signed [W-1:0]  f    [NF];
  logic                 last_pass;

  assign last_pass = (passes(mode_q) == 1) || pass_q;
  assign in_ready  = !busy || last_pass;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      pass_q <= 1'b0;
      mode_q <= M_HAD2;
      for (int i = 0; i < NX; i++) x_q[i] <= '0;
    end else if (in_valid && in_ready) begin
      busy   <= 1'b1;
      pass_q <= 1'b0;
      mode_q <= in_mode;
      x_q    <= in_x;
    end else if (busy) begin
      if (last_pass) begin
        busy   <= 1'b0;
        pass_q <= 1'b0;
      end else begin
        pass_q <= 1'b1;
      end
    end
  end

  ua_datapath #(.W(W)) u_datapath (
    .mode(mode_q), .pass(pass_q), .x(x_q), .f(f));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= M_HAD2;
      out_pass  <= 1'b0;
      for (int i = 0; i < NF; i++) out_f[i] <= '0;
    end else begin
      out_valid <= busy;
      out_mode  <= mode_q;
      out_pass  <= pass_q;
      out_f     <= f;
    end
  end

  // Upstream rule: a block offered and not taken stays offered, unchanged.
  a_hold_offer: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid && !in_ready |=> in_valid && $stable(in_mode));

  // The second pass only exists for the 4x4 transforms.
  a_pass_mode: assert property (@(posedge clk) disable iff (!rst_n)
      busy && pass_q |-> passes(mode_q) == 2);

endmodule
