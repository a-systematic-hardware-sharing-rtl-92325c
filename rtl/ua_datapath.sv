// ua_datapath: the unified architecture for the six H.264 transforms.
//
// Four stages of shared operation nodes, each fed by its own mux-based
// routing network (ua_route):
//   stage 1: 12 nodes  A0..A11  (nodes 0..7 add or subtract per mode/pass,
//                                nodes 8..11 add)
//   stage 2: 16 nodes  B0..B15  (even nodes add, odd nodes subtract)
//   stage 3:  8 nodes  C0..C7   (+ - - + + - - +)
//   stage 4:  8 nodes  F0..F7   (F0..F3 add, F4..F7 subtract)
// There are no registers inside: one pass through the network is one clock
// cycle of the surrounding unit.
//
// Input and output meaning per mode (X and F are W-bit two's complement):
//   M_INV8 / M_FWD8: X0..X7 = one 8-sample row or column, F0..F7 = its
//     1D 8-point inverse / forward transform, F_k = y_k. One pass.
//   M_INV4 / M_FWD4 / M_HAD4: X[4i+j] = element (i,j) of a 4x4 block; two
//     passes, F0..F3 = row r0 columns 0..3 and F4..F7 = row r1 columns 0..3,
//     where (r0,r1) = inverse: (0,3) in pass 0, (1,2) in pass 1;
//     forward and Hadamard: (0,2) in pass 0, (1,3) in pass 1.
//   M_HAD2: X0..X3 = c00 c01 c10 c11 of a 2x2 block, F0..F3 = y00 y01 y10
//     y11, F4..F7 = 0. One pass, 4 results.
// Arithmetic wraps at W bits; >>> truncates toward minus infinity, as the
// shift-and-add decompositions assume.
//
// The stage and node counts and the fixed operations of stages 2..4 follow
// the unified architecture as published; the 8x8 inverse and 4x4 inverse
// dataflows are the published ones. The stage-1 add/subtract nodes, the
// direct access of later routing networks to primary inputs and to all
// earlier stages, and the dataflows of the other four transforms are this
// design's own choices.
module ua_datapath
  import h264_tx_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  mode_t                mode,
  input  logic                 pass,
  input  logic signed [W-1:0]  x [NX],
  output logic signed [W-1:0]  f [NF]
);

  localparam int unsigned NS1 = NX;
  localparam int unsigned NS2 = NX + NA;
  localparam int unsigned NS3 = NX + NA + NB;
  localparam int unsigned NS4 = NX + NA + NB + NC;

  logic signed [W-1:0] s1 [NS1];
  logic signed [W-1:0] s2 [NS2];
  logic signed [W-1:0] s3 [NS3];
  logic signed [W-1:0] s4 [NS4];

  logic signed [W-1:0] a1 [NA], b1 [NA];
  logic signed [W-1:0] a2 [NB], b2 [NB];
  logic signed [W-1:0] a3 [NC], b3 [NC];
  logic signed [W-1:0] a4 [NF], b4 [NF];
  logic [NA-1:0] sub1;
  logic [NB-1:0] sub2_unused;
  logic [NC-1:0] sub3_unused;
  logic [NF-1:0] sub4_unused;

  logic signed [W-1:0] na [NA];
  logic signed [W-1:0] nb [NB];
  logic signed [W-1:0] nc [NC];

  // Visible signals of each stage: inputs, then earlier node outputs.
  always_comb begin
    for (int i = 0; i < NX; i++) begin
      s1[i] = x[i];
      s2[i] = x[i];
      s3[i] = x[i];
      s4[i] = x[i];
    end
    for (int i = 0; i < NA; i++) begin
      s2[BASE_A + i] = na[i];
      s3[BASE_A + i] = na[i];
      s4[BASE_A + i] = na[i];
    end
    for (int i = 0; i < NB; i++) begin
      s3[BASE_B + i] = nb[i];
      s4[BASE_B + i] = nb[i];
    end
    for (int i = 0; i < NC; i++) s4[BASE_C + i] = nc[i];
  end

  ua_route #(.W(W), .STAGE(1), .NSRC(NS1), .NNODE(NA)) u_route1 (
    .mode, .pass, .src(s1), .op_a(a1), .op_b(b1), .sub(sub1));
  ua_route #(.W(W), .STAGE(2), .NSRC(NS2), .NNODE(NB)) u_route2 (
    .mode, .pass, .src(s2), .op_a(a2), .op_b(b2), .sub(sub2_unused));
  ua_route #(.W(W), .STAGE(3), .NSRC(NS3), .NNODE(NC)) u_route3 (
    .mode, .pass, .src(s3), .op_a(a3), .op_b(b3), .sub(sub3_unused));
  ua_route #(.W(W), .STAGE(4), .NSRC(NS4), .NNODE(NF)) u_route4 (
    .mode, .pass, .src(s4), .op_a(a4), .op_b(b4), .sub(sub4_unused));

  // Shared operation nodes.
  always_comb begin
    for (int i = 0; i < NA; i++)
      na[i] = (i < 8 && sub1[i]) ? a1[i] - b1[i] : a1[i] + b1[i];
    for (int i = 0; i < NB; i++)
      nb[i] = S2_SUB[i] ? a2[i] - b2[i] : a2[i] + b2[i];
    for (int i = 0; i < NC; i++)
      nc[i] = S3_SUB[i] ? a3[i] - b3[i] : a3[i] + b3[i];
    for (int i = 0; i < NF; i++)
      f[i]  = S4_SUB[i] ? a4[i] - b4[i] : a4[i] + b4[i];
  end

endmodule
