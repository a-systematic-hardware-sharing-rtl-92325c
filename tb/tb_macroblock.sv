// tb_macroblock: workload test of the transform unit on one 4:2:0
// macroblock, at default parameters.
//
// Phases, each streamed back-to-back through h264_transform_unit:
//   1. 16 luma 4x4 residual blocks, forward 4x4 transform
//   2. the 16 luma DC terms of phase 1, 4x4 Hadamard
//   3. 2 x 4 chroma 4x4 residual blocks, forward 4x4 transform
//   4. 2 x 4 chroma DC terms of phase 3, 2x2 Hadamard
//   5. one 8x8 residual block, 2D forward: 8 row transforms, then 8 column
//      transforms of the transposed rows (transposition done here)
//   6. the same 8x8 block of coefficients, 2D inverse the same way
// Every result is compared with the reference models; every phase must
// take exactly (blocks-1)*passes clock edges between its first and its last
// accepted block, i.e. 8 results per cycle (4 for the 2x2 Hadamard).
module tb_macroblock;
  import h264_tx_pkg::*;
  import tx_ref_pkg::*;

  localparam int W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_pass;
  mode_t in_mode, out_mode;
  logic signed [W-1:0] in_x [NX];
  logic signed [W-1:0] out_f [NF];

  h264_transform_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0, total_cycles = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Collected output passes
  int outs [$];
  always @(posedge clk)
    if (rst_n && out_valid)
      for (int k = 0; k < 8; k++) outs.push_back(int'(out_f[k]));

  // Stream blocks of one mode back-to-back; returns the raw output passes
  // (8 values per pass, in order).
  task automatic run_phase(string name, mode_t m, vec16_t blocks [$], output int res [$]);
    int t_first, t_last, np;
    np = int'(passes(m));
    outs.delete();
    foreach (blocks[b]) begin
      in_valid <= 1'b1;
      in_mode  <= m;
      for (int i = 0; i < 16; i++) in_x[i] <= W'(blocks[b][i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (b == 0) t_first = cycle;
      t_last = cycle;
    end
    in_valid <= 1'b0;
    repeat (np + 2) @(posedge clk);
    chk({name, " cycles"}, t_last - t_first, (blocks.size() - 1) * np);
    chk({name, " passes"}, outs.size(), 8 * np * blocks.size());
    total_cycles += blocks.size() * np;
    res = outs;
  endtask

  function automatic vec16_t rnd_block(int r);
    vec16_t v;
    for (int i = 0; i < 16; i++) v[i] = int'($urandom_range(2 * r)) - r;
    return v;
  endfunction

  // Reassemble a 4x4 result (two passes) into raster order.
  function automatic vec16_t unpack4(int res [$], int base, mode_t m);
    vec16_t y;
    int r0, r1;
    for (int p = 0; p < 2; p++) begin
      if (m == M_INV4) begin r0 = p ? 1 : 0; r1 = p ? 2 : 3; end
      else             begin r0 = p ? 1 : 0; r1 = p ? 3 : 2; end
      for (int j = 0; j < 4; j++) begin
        y[4*r0 + j] = res[base + 8*p + j];
        y[4*r1 + j] = res[base + 8*p + 4 + j];
      end
    end
    return y;
  endfunction

  initial begin
    vec16_t luma [$], luma_c [$], chroma [$], chroma_c [$], dc4 [$], dc2 [$], rows [$], cols [$];
    vec16_t y, v;
    int res [$];
    int blk8 [8][8], f8r [8][8], f8 [8][8], i8r [8][8], i8 [8][8];
    vec8_t v8, e8;

    in_valid = 1'b0;
    in_mode  = M_HAD2;
    for (int i = 0; i < 16; i++) in_x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. luma forward 4x4
    for (int b = 0; b < 16; b++) luma.push_back(rnd_block(255));
    run_phase("luma 4x4", M_FWD4, luma, res);
    for (int b = 0; b < 16; b++) begin
      y = unpack4(res, 16 * b, M_FWD4);
      luma_c.push_back(y);
      v = exact_fwd4(luma[b]);
      for (int i = 0; i < 16; i++) chk("luma coef", y[i], v[i]);
    end

    // 2. luma DC Hadamard
    v = '{default: 0};
    for (int b = 0; b < 16; b++) v[b] = luma_c[b][0] >>> 2;  // scaled DC terms
    dc4.push_back(v);
    run_phase("luma DC", M_HAD4, dc4, res);
    y = unpack4(res, 0, M_HAD4);
    v = exact_had4(dc4[0]);
    for (int i = 0; i < 16; i++) chk("luma DC", y[i], v[i]);

    // 3. chroma forward 4x4, 4 blocks per component
    for (int b = 0; b < 8; b++) chroma.push_back(rnd_block(255));
    run_phase("chroma 4x4", M_FWD4, chroma, res);
    for (int b = 0; b < 8; b++) begin
      y = unpack4(res, 16 * b, M_FWD4);
      chroma_c.push_back(y);
      v = exact_fwd4(chroma[b]);
      for (int i = 0; i < 16; i++) chk("chroma coef", y[i], v[i]);
    end

    // 4. chroma DC 2x2 Hadamard, one per component
    for (int c = 0; c < 2; c++) begin
      v = '{default: 0};
      for (int k = 0; k < 4; k++) v[k] = chroma_c[4*c + k][0];
      dc2.push_back(v);
    end
    run_phase("chroma DC", M_HAD2, dc2, res);
    for (int c = 0; c < 2; c++) begin
      for (int k = 0; k < 8; k++) v8[k] = dc2[c][k];
      e8 = exact_had2(v8);
      for (int k = 0; k < 4; k++) chk("chroma DC", res[8*c + k], e8[k]);
    end

    // 5. 8x8 forward: rows, then columns
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) blk8[r][c] = int'($urandom_range(510)) - 255;
    rows.delete();
    for (int r = 0; r < 8; r++) begin
      v = '{default: 0};
      for (int c = 0; c < 8; c++) v[c] = blk8[r][c];
      rows.push_back(v);
    end
    run_phase("8x8 fwd rows", M_FWD8, rows, res);
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v8[c] = blk8[r][c];
      e8 = bitx_fwd8(v8);
      for (int c = 0; c < 8; c++) begin
        f8r[r][c] = res[8*r + c];
        chk("8x8 fwd row", f8r[r][c], e8[c]);
      end
    end
    // Row results can exceed the 9-bit input range of the forward
    // transform; the column sweep scales them down first.
    cols.delete();
    for (int c = 0; c < 8; c++) begin
      v = '{default: 0};
      for (int r = 0; r < 8; r++) v[r] = f8r[r][c] >>> 3;
      cols.push_back(v);
    end
    run_phase("8x8 fwd cols", M_FWD8, cols, res);
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v8[r] = cols[c][r];
      e8 = bitx_fwd8(v8);
      for (int r = 0; r < 8; r++) begin
        f8[r][c] = res[8*c + r];
        chk("8x8 fwd col", f8[r][c], e8[r]);
      end
    end

    // 6. 8x8 inverse of those coefficients: rows, then columns
    rows.delete();
    for (int r = 0; r < 8; r++) begin
      v = '{default: 0};
      for (int c = 0; c < 8; c++) v[c] = f8[r][c];
      rows.push_back(v);
    end
    run_phase("8x8 inv rows", M_INV8, rows, res);
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) v8[c] = f8[r][c];
      e8 = bitx_inv8(v8);
      for (int c = 0; c < 8; c++) begin
        i8r[r][c] = res[8*r + c];
        chk("8x8 inv row", i8r[r][c], e8[c]);
      end
    end
    cols.delete();
    for (int c = 0; c < 8; c++) begin
      v = '{default: 0};
      for (int r = 0; r < 8; r++) v[r] = i8r[r][c] >>> 3;
      cols.push_back(v);
    end
    run_phase("8x8 inv cols", M_INV8, cols, res);
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v8[r] = cols[c][r];
      e8 = bitx_inv8(v8);
      for (int r = 0; r < 8; r++) begin
        i8[r][c] = res[8*c + r];
        chk("8x8 inv col", i8[r][c], e8[r]);
      end
    end

    // Compute cycles of the whole macroblock workload: 32 + 2 + 16 + 2 + 16 + 16
    chk("macroblock compute cycles", total_cycles, 84);
    $display("macroblock workload: %0d compute cycles", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
