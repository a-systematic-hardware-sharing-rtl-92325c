// tb_ua_datapath: self-checking test of the unified transform datapath.
//
// For each of the six modes it applies fixed vectors (zero, impulses, DC,
// extreme values inside the no-overflow range) and random blocks, and
// compares every output of every pass with
//  * a bit-exact model of the shift-and-add decomposition (tx_ref_pkg), and
//  * the exact matrix product: equal for 4x4 forward/Hadamard and 2x2
//    Hadamard, within a small truncation bound for the transforms with
//    fractional coefficients.
// Input ranges keep every intermediate value inside the 16-bit width:
// 12-bit for the 8-point inverse, 11-bit for the 4x4 inverse, 9-bit
// residuals for the forward transforms, 11-bit for the 4x4 Hadamard and
// 14-bit for the 2x2 Hadamard.
module tb_ua_datapath;
  import h264_tx_pkg::*;
  import tx_ref_pkg::*;

  localparam int W = 16;
  localparam int NRAND = 3000;
  localparam int TOL = 4;   // truncation bound, in output LSBs

  mode_t                mode;
  logic                 pass;
  logic signed [W-1:0]  x [NX];
  logic signed [W-1:0]  f [NF];

  int checks = 0, failures = 0;
  int max_err [6];

  ua_datapath dut (.mode, .pass, .x, .f);

  // Watchdog: the test is purely combinational and ends long before this.
  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int range_of(mode_t m);
    case (m)
      M_INV8: return 4095;
      M_INV4: return 2047;
      M_FWD8, M_FWD4: return 255;
      M_HAD4: return 1023;
      default: return 8191;
    endcase
  endfunction

  function automatic int rnd(int r);
    return int'($urandom_range(2 * r)) - r;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: mode %s pass %0d got %0d expected %0d", what, mode.name(), pass, got, exp);
    end
  endtask

  task automatic expect_near(string what, int got_scaled, int exp_scaled, int scale);
    int err;
    err = got_scaled - exp_scaled;
    if (err < 0) err = -err;
    checks++;
    if (err > max_err[mode]) max_err[mode] = err;
    if (err > TOL * scale) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: mode %s pass %0d got %0d/%0d expected %0d/%0d",
                 what, mode.name(), pass, got_scaled, scale, exp_scaled, scale);
    end
  endtask

  // Apply one block in mode m and check all passes.
  task automatic run_block(mode_t m, vec16_t v);
    vec16_t y16, e16;
    vec8_t v8, y8, e8;
    int r0, r1;
    mode = m;
    for (int i = 0; i < NX; i++) x[i] = W'(v[i]);
    for (int i = 0; i < 8; i++) v8[i] = v[i];
    for (int p = 0; p < int'(passes(m)); p++) begin
      pass = p[0];
      #1;
      case (m)
        M_INV8: begin
          y8 = bitx_inv8(v8);
          e8 = exact_inv8(v8);
          for (int k = 0; k < 8; k++) begin
            expect_eq("inv8 bit-exact", int'(f[k]), y8[k]);
            expect_near("inv8 vs matrix", 8 * int'(f[k]), e8[k], 8);
          end
        end
        M_FWD8: begin
          y8 = bitx_fwd8(v8);
          e8 = exact_fwd8(v8);
          for (int k = 0; k < 8; k++) begin
            expect_eq("fwd8 bit-exact", int'(f[k]), y8[k]);
            expect_near("fwd8 vs matrix", 8 * int'(f[k]), e8[k], 8);
          end
        end
        M_HAD2: begin
          e8 = exact_had2(v8);
          for (int k = 0; k < 4; k++) expect_eq("had2", int'(f[k]), e8[k]);
          for (int k = 4; k < 8; k++) expect_eq("had2 idle output", int'(f[k]), 0);
        end
        default: begin
          if (m == M_INV4) begin
            r0 = p ? 1 : 0;  r1 = p ? 2 : 3;
            y16 = bitx_inv4(v);
            e16 = exact_inv4x4(v);
          end else begin
            r0 = p ? 1 : 0;  r1 = p ? 3 : 2;
            y16 = (m == M_FWD4) ? exact_fwd4(v) : exact_had4(v);
            e16 = y16;
          end
          for (int j = 0; j < 4; j++) begin
            expect_eq("4x4 row a", int'(f[j]),     y16[4*r0 + j]);
            expect_eq("4x4 row b", int'(f[4 + j]), y16[4*r1 + j]);
            if (m == M_INV4) begin
              expect_near("inv4 vs matrix", 4 * int'(f[j]),     e16[4*r0 + j], 4);
              expect_near("inv4 vs matrix", 4 * int'(f[4 + j]), e16[4*r1 + j], 4);
            end
          end
        end
      endcase
    end
  endtask

  initial begin
    vec16_t v;
    mode_t ms [6] = '{M_HAD2, M_HAD4, M_FWD4, M_INV4, M_FWD8, M_INV8};
    foreach (max_err[i]) max_err[i] = 0;
    foreach (ms[mi]) begin
      int r;
      r = range_of(ms[mi]);
      // zero block
      v = '{default: 0};
      run_block(ms[mi], v);
      // impulses at every position
      for (int i = 0; i < 16; i++) begin
        v = '{default: 0};
        v[i] = r;
        run_block(ms[mi], v);
        v[i] = -r;
        run_block(ms[mi], v);
      end
      // DC and alternating extremes
      v = '{default: r};
      run_block(ms[mi], v);
      for (int i = 0; i < 16; i++) v[i] = (i % 2) ? -r : r;
      run_block(ms[mi], v);
      // random blocks
      for (int t = 0; t < NRAND; t++) begin
        for (int i = 0; i < 16; i++) v[i] = rnd(r);
        run_block(ms[mi], v);
      end
    end
    $display("max scaled error inv8=%0d/8 fwd8=%0d/8 inv4=%0d/4",
             max_err[M_INV8], max_err[M_FWD8], max_err[M_INV4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
