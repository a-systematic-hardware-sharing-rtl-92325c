// tb_ua_route: self-checking test of the mux-based routing network.
//
// Four routing networks (one per stage, with the number of visible signals
// each stage has) are driven with random signal values. For a set of
// node/mode/pass cases the delivered operands are compared with the signal
// and scaling that the transform's equations call for, e.g. stage-1 node
// holding 1.5*X1 of the 8-point inverse must receive X1 and X1>>1, and the
// 4x4 forward transform's second pass must receive 2*C in stage 4. It also
// checks that unused nodes get zero operands and that the stage-1
// add/subtract control follows the pass of the 4x4 transforms.
module tb_ua_route;
  import h264_tx_pkg::*;

  localparam int W = 16;
  localparam int N1 = NX, N2 = NX + NA, N3 = NX + NA + NB, N4 = NX + NA + NB + NC;

  mode_t mode;
  logic  pass;
  logic signed [W-1:0] s [N4];
  logic signed [W-1:0] s1 [N1];
  logic signed [W-1:0] s2 [N2];
  logic signed [W-1:0] s3 [N3];
  logic signed [W-1:0] a1 [NA], b1 [NA], a2 [NB], b2 [NB];
  logic signed [W-1:0] a3 [NC], b3 [NC], a4 [NF], b4 [NF];
  logic [NA-1:0] sub1;
  logic [NB-1:0] sub2;
  logic [NC-1:0] sub3;
  logic [NF-1:0] sub4;

  int checks = 0, failures = 0;

  always_comb begin
    for (int i = 0; i < N1; i++) s1[i] = s[i];
    for (int i = 0; i < N2; i++) s2[i] = s[i];
    for (int i = 0; i < N3; i++) s3[i] = s[i];
  end

  ua_route #(.W(W), .STAGE(1), .NSRC(N1), .NNODE(NA)) r1 (.mode, .pass, .src(s1), .op_a(a1), .op_b(b1), .sub(sub1));
  ua_route #(.W(W), .STAGE(2), .NSRC(N2), .NNODE(NB)) r2 (.mode, .pass, .src(s2), .op_a(a2), .op_b(b2), .sub(sub2));
  ua_route #(.W(W), .STAGE(3), .NSRC(N3), .NNODE(NC)) r3 (.mode, .pass, .src(s3), .op_a(a3), .op_b(b3), .sub(sub3));
  ua_route #(.W(W), .STAGE(4), .NSRC(N4), .NNODE(NF)) r4 (.mode, .pass, .src(s),  .op_a(a4), .op_b(b4), .sub(sub4));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // signal values by name
  function automatic int X(int i); return int'(s[i]); endfunction
  function automatic int A(int i); return int'(s[NX + i]); endfunction
  function automatic int B(int i); return int'(s[NX + NA + i]); endfunction
  function automatic int C(int i); return int'(s[NX + NA + NB + i]); endfunction
  function automatic int half(int v);    return v >>> 1; endfunction
  function automatic int quarter(int v); return v >>> 2; endfunction
  function automatic int dbl(int v);     return int'($signed(16'(v <<< 1))); endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (mode %s pass %0d): got %0d expected %0d", what, mode.name(), pass, got, exp);
    end
  endtask

  task automatic one_round();
    for (int i = 0; i < N4; i++) s[i] = W'($urandom);
    // 8-point inverse: A0 = X1 + X1/2, A3 = X1 - X1/4, B0 = X0 + X4,
    // B4 = A0 + A1/4, C4 = B4 + B8, Y0 = C0 + C4
    mode = M_INV8; pass = 0; #1;
    chk("inv8 s1 n4 a", a1[4], X(1));         chk("inv8 s1 n4 b", b1[4], half(X(1)));
    chk("inv8 s1 n0 a", a1[0], X(1));         chk("inv8 s1 n0 b", b1[0], quarter(X(1)));
    chk("inv8 s1 n0 sub", sub1[0], 1);        chk("inv8 s1 n4 sub", sub1[4], 0);
    chk("inv8 s1 n1 a", a1[1], quarter(X(7))); chk("inv8 s1 n1 b", b1[1], X(7));
    chk("inv8 s2 n0 a", a2[0], X(0));         chk("inv8 s2 n0 b", b2[0], X(4));
    chk("inv8 s2 n3 a", a2[3], X(6));         chk("inv8 s2 n3 b", b2[3], half(X(2)));
    chk("inv8 s2 n4 a", a2[4], A(4));         chk("inv8 s2 n4 b", b2[4], quarter(A(5)));
    chk("inv8 s2 n9 a", a2[9], 0);            chk("inv8 s2 n9 b", b2[9], 0);
    chk("inv8 s3 n4 a", a3[4], B(4));         chk("inv8 s3 n4 b", b3[4], B(10));
    chk("inv8 s4 n0 a", a4[0], C(0));         chk("inv8 s4 n0 b", b4[0], C(4));
    chk("inv8 s4 n7 a", a4[7], C(0));         chk("inv8 s4 n7 b", b4[7], C(4));
    // 8-point forward: a4 = x0 - x7, y1 = b4 + b7/4, y0 passes through
    mode = M_FWD8; #1;
    chk("fwd8 s1 n4 a", a1[4], X(0));         chk("fwd8 s1 n4 b", b1[4], X(7));
    chk("fwd8 s1 n4 sub", sub1[4], 1);        chk("fwd8 s1 n9", a1[9], 0);
    chk("fwd8 s4 n1 a", a4[1], C(4));         chk("fwd8 s4 n1 b", b4[1], quarter(C(7)));
    chk("fwd8 s4 n0 b", b4[0], 0);
    // 4x4 inverse: stage-1 sum in pass 0, difference in pass 1
    mode = M_INV4; pass = 0; #1;
    chk("inv4 p0 s1 n1 a", a1[1], X(1));      chk("inv4 p0 s1 n1 b", b1[1], X(9));
    chk("inv4 p0 s1 n1 sub", sub1[1], 0);
    chk("inv4 p0 s1 n5 a", a1[5], X(5));      chk("inv4 p0 s1 n5 b", b1[5], half(X(13)));
    pass = 1; #1;
    chk("inv4 p1 s1 n1 sub", sub1[1], 1);
    chk("inv4 p1 s1 n5 a", a1[5], half(X(5))); chk("inv4 p1 s1 n5 b", b1[5], X(13));
    chk("inv4 p1 s1 n5 sub", sub1[5], 1);
    chk("inv4 s2 n10 a", a2[10], A(4));       chk("inv4 s2 n10 b", b2[10], half(A(5)));
    chk("inv4 s3 n5 a", a3[5], B(10));        chk("inv4 s3 n5 b", b3[5], B(14));
    chk("inv4 s4 n6 a", a4[6], C(2));         chk("inv4 s4 n6 b", b4[6], C(6));
    // 4x4 forward: doubled operands in stage 2 and in pass 1 of stage 4
    mode = M_FWD4; pass = 0; #1;
    chk("fwd4 s1 n6 a", a1[6], X(6));         chk("fwd4 s1 n6 b", b1[6], X(10));
    chk("fwd4 s2 n2 a", a2[2], dbl(A(0)));    chk("fwd4 s2 n2 b", b2[2], A(1));
    chk("fwd4 p0 s4 n1 a", a4[1], C(1));
    pass = 1; #1;
    chk("fwd4 p1 s4 n1 a", a4[1], dbl(C(1))); chk("fwd4 p1 s4 n1 b", b4[1], C(5));
    chk("fwd4 p1 s4 n5 b", b4[5], dbl(C(5)));
    // 4x4 Hadamard: no scaling anywhere
    mode = M_HAD4; #1;
    chk("had4 s2 n2 a", a2[2], A(0));         chk("had4 s4 n5 b", b4[5], C(5));
    // 2x2 Hadamard: butterflies in stages 1 and 2, then pass-through
    mode = M_HAD2; pass = 0; #1;
    for (int n = 4; n < NA; n++) begin
      chk("had2 s1 idle a", a1[n], 0);        chk("had2 s1 idle b", b1[n], 0);
    end
    chk("had2 s1 n1 a", a1[1], X(0));         chk("had2 s1 n1 b", b1[1], X(1));
    chk("had2 s1 n1 sub", sub1[1], 1);        chk("had2 s1 n0 sub", sub1[0], 0);
    chk("had2 s2 n3 a", a2[3], A(1));         chk("had2 s2 n3 b", b2[3], A(3));
    chk("had2 s3 n3 a", a3[3], B(2));         chk("had2 s3 n3 b", b3[3], 0);
    chk("had2 s4 n1 a", a4[1], C(3));         chk("had2 s4 n1 b", b4[1], 0);
    chk("had2 s4 n5 a", a4[5], 0);
  endtask

  initial begin
    for (int t = 0; t < 200; t++) one_round();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
