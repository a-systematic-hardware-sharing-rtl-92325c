// tb_h264_transform_unit: end-to-end test of the registered transform unit
// at its default parameters.
//
// A stream of blocks with random transform modes is offered with random
// idle cycles. Every accepted block is queued with the cycle it was taken;
// each output pass is checked against the reference models (tx_ref_pkg) and
// must appear exactly one cycle after the block was taken (pass 0) or two
// cycles after (pass 1 of the 4x4 transforms). The test also checks the
// sustained rate of a gap-free stream: 8 results per cycle for 8-point and
// 4x4 transforms, 4 for the 2x2 Hadamard.
// Counted mechanisms, each of which must occur: every one of the six modes,
// a switch of mode between consecutive blocks, a two-pass block, a block
// taken while the previous one runs its last pass (back-to-back), an offer
// held back while a 4x4 block runs its first pass (stall), and an idle gap.
module tb_h264_transform_unit;
  import h264_tx_pkg::*;
  import tx_ref_pkg::*;

  localparam int W = 16;
  localparam int NBLOCKS = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_pass;
  mode_t in_mode, out_mode;
  logic signed [W-1:0] in_x [NX];
  logic signed [W-1:0] out_f [NF];

  h264_transform_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    mode_t  m;
    vec16_t v;
    int     t_acc;
  } blk_t;
  blk_t q[$];

  int n_mode [6];
  int n_switch = 0, n_twopass = 0, n_b2b = 0, n_stall = 0, n_idle = 0;
  int n_out_passes = 0;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cycle, got, exp);
    end
  endtask

  function automatic int range_of(mode_t m);
    case (m)
      M_INV8: return 4095;
      M_INV4: return 2047;
      M_FWD8, M_FWD4: return 255;
      M_HAD4: return 1023;
      default: return 8191;
    endcase
  endfunction

  // Expected 8 outputs of pass p of block b.
  function automatic vec8_t expected(blk_t b, int p);
    vec8_t e = '{default: 0};
    vec8_t v8;
    vec16_t y;
    int r0, r1;
    for (int i = 0; i < 8; i++) v8[i] = b.v[i];
    case (b.m)
      M_INV8: e = bitx_inv8(v8);
      M_FWD8: e = bitx_fwd8(v8);
      M_HAD2: e = exact_had2(v8);
      default: begin
        if (b.m == M_INV4) begin
          y = bitx_inv4(b.v); r0 = p ? 1 : 0; r1 = p ? 2 : 3;
        end else begin
          y = (b.m == M_FWD4) ? exact_fwd4(b.v) : exact_had4(b.v);
          r0 = p ? 1 : 0; r1 = p ? 3 : 2;
        end
        for (int j = 0; j < 4; j++) begin
          e[j]     = y[4*r0 + j];
          e[4 + j] = y[4*r1 + j];
        end
      end
    endcase
    return e;
  endfunction

  // Output checker
  int exp_pass = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vec8_t e;
      n_out_passes++;
      if (q.size() == 0) begin
        chk("unexpected output", 1, 0);
      end else begin
        chk("out_mode", int'(out_mode), int'(q[0].m));
        chk("out_pass", int'(out_pass), exp_pass);
        // Taken at edge k, registered at edge k+1 + pass, sampled here one
        // edge later.
        chk("latency", cycle - q[0].t_acc, 2 + exp_pass);
        e = expected(q[0], exp_pass);
        for (int k = 0; k < 8; k++) chk("out_f", int'(out_f[k]), e[k]);
        if (exp_pass + 1 == int'(passes(q[0].m))) begin
          void'(q.pop_front());
          exp_pass = 0;
        end else begin
          exp_pass++;
        end
      end
    end
  end

  // Driver
  mode_t last_mode;
  bit    have_last = 0;
  bit    prev_busy_two = 0;

  task automatic offer(mode_t m, bit allow_gap);
    blk_t b;
    int r;
    b.m = m;
    r = range_of(m);
    for (int i = 0; i < 16; i++) b.v[i] = int'($urandom_range(2 * r)) - r;
    if (allow_gap && $urandom_range(3) == 0) begin
      in_valid <= 1'b0;
      n_idle++;
      @(posedge clk);
    end
    in_valid <= 1'b1;
    in_mode  <= m;
    for (int i = 0; i < 16; i++) in_x[i] <= W'(b.v[i]);
    @(posedge clk);
    while (!in_ready) begin
      n_stall++;
      @(posedge clk);
    end
    // accepted at this edge
    b.t_acc = cycle;
    if (dut.busy) n_b2b++;
    q.push_back(b);
    n_mode[m]++;
    if (passes(m) == 2) n_twopass++;
    if (have_last && last_mode != m) n_switch++;
    last_mode = m;
    have_last = 1;
  endtask

  initial begin
    int t0, t1, res;
    mode_t ms [6] = '{M_HAD2, M_HAD4, M_FWD4, M_INV4, M_FWD8, M_INV8};
    foreach (n_mode[i]) n_mode[i] = 0;
    in_valid = 1'b0;
    in_mode  = M_HAD2;
    for (int i = 0; i < 16; i++) in_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Random mix of modes with idle gaps.
    for (int b = 0; b < NBLOCKS; b++)
      offer(ms[$urandom_range(5)], 1'b1);
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    chk("queue drained", q.size(), 0);

    // Throughput of gap-free streams, one per mode.
    foreach (ms[mi]) begin
      int nres;
      t0 = n_out_passes;
      res = cycle;
      for (int b = 0; b < 32; b++) offer(ms[mi], 1'b0);
      in_valid <= 1'b0;
      t1 = cycle;
      repeat (4) @(posedge clk);
      // One block is taken every `passes` cycles: the first one edge after
      // the stream starts, the last (32-1)*passes edges later.
      chk("stream cycles", t1 - res, 31 * int'(passes(ms[mi])) + 1);
      nres = (ms[mi] == M_HAD2) ? 4 : 8;
      chk("results per cycle", (31 * int'(passes(ms[mi])) * nres) / (t1 - res - 1), nres);
      chk("stream passes", n_out_passes - t0, 32 * int'(passes(ms[mi])));
    end
    chk("queue drained", q.size(), 0);

    $display("modes: had2=%0d had4=%0d fwd4=%0d inv4=%0d fwd8=%0d inv8=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5]);
    $display("mode switches=%0d two-pass blocks=%0d back-to-back=%0d stalls=%0d idle gaps=%0d",
             n_switch, n_twopass, n_b2b, n_stall, n_idle);
    foreach (n_mode[i]) chk("mode exercised", int'(n_mode[i] > 0), 1);
    chk("mode switch exercised", int'(n_switch > 0), 1);
    chk("two-pass exercised", int'(n_twopass > 0), 1);
    chk("back-to-back exercised", int'(n_b2b > 0), 1);
    chk("stall exercised", int'(n_stall > 0), 1);
    chk("idle gap exercised", int'(n_idle > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
