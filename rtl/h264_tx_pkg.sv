// h264_tx_pkg: shared types, node operations and routing tables of the unified
// H.264 transform architecture.
//
// The unified architecture is a four-stage network of shared two-input
// operation nodes (12, 16, 8 and 8 nodes per stage). In front of every stage a
// mux-based routing network picks, for each node operand, the signal path that
// the selected transform needs and applies a fixed power-of-two scaling
// (>>1, >>2 or <<1). This package holds the per-mode routing table that drives
// those multiplexers, as one function that the routing networks evaluate on the
// 3-bit transform select and the pass number.
//
// Mode encoding follows the order in which the transforms are listed at the
// 6-to-1 routing multiplexer: 2x2 Hadamard, 4x4 Hadamard, 4x4 forward,
// 4x4 inverse, 8x8 forward, 8x8 inverse.
//
// Source numbering seen by a routing network (only earlier signals are
// visible to a stage):
//   0..15  primary inputs X0..X15
//   16..27 stage-1 node outputs A0..A11
//   28..43 stage-2 node outputs B0..B15
//   44..51 stage-3 node outputs C0..C7
//
// Node operations in stages 2..4 are fixed (add or subtract per node, see
// S2_SUB/S3_SUB/S4_SUB). Stage-1 nodes 0..7 are add/subtract nodes whose
// operation comes from the table (the 4x4 transforms need a sum in one pass
// and a difference in the other); stage-1 nodes 8..11 only ever add.
//
// Per-transform dataflows (all names refer to unified node indices):
//  * 8x8 inverse: the published four-stage operation-sharing dataflow
//    (12 scaled-input nodes, 12 second-stage nodes, 8 + 8 butterflies),
//    with its nodes placed onto unified nodes of matching operation.
//  * 8x8 forward: the usual even/odd butterfly factorisation of the H.264
//    8x8 forward core transform, fitted onto the same node operations.
//  * 4x4 forward/inverse/Hadamard: direct 2D transform, 8 outputs per pass.
//    Stage 1 combines input rows (rows 0/2 or 0/3 and 1/3 or 1/2), stages 2
//    and 3 transform along the row, stage 4 combines the two halves.
//  * 2x2 Hadamard: like any transform needing fewer than four levels, it
//    starts at stage 1: butterflies in stages 1 and 2, stages 3 and 4 pass
//    the four results through.
package h264_tx_pkg;

  typedef enum logic [2:0] {
    M_HAD2 = 3'd0,   // 2D 2x2 Hadamard (chroma DC), 4 outputs, 1 pass
    M_HAD4 = 3'd1,   // 2D 4x4 Hadamard (luma DC), 2 passes of 8
    M_FWD4 = 3'd2,   // 2D 4x4 forward integer transform, 2 passes of 8
    M_INV4 = 3'd3,   // 2D 4x4 inverse integer transform, 2 passes of 8
    M_FWD8 = 3'd4,   // 1D 8-point forward integer transform, 1 pass
    M_INV8 = 3'd5    // 1D 8-point inverse integer transform, 1 pass
  } mode_t;

  typedef enum logic [1:0] {
    SH_NONE = 2'd0,  // x
    SH_R1   = 2'd1,  // x >>> 1  (coefficient 0.5)
    SH_R2   = 2'd2,  // x >>> 2  (coefficient 0.25)
    SH_L1   = 2'd3   // x <<< 1  (coefficient 2)
  } shift_t;

  localparam int unsigned SRC_W = 6;

  // One operand of a node: which signal, how it is scaled, or constant zero.
  typedef struct packed {
    logic              zero;
    logic [SRC_W-1:0]  src;
    shift_t            sh;
  } operand_t;

  // Route of one node: two operands and, for stage 1, the operation.
  typedef struct packed {
    operand_t a;
    operand_t b;
    logic     sub;
  } node_route_t;

  localparam int unsigned NX  = 16;  // primary inputs
  localparam int unsigned NA  = 12;  // stage-1 nodes
  localparam int unsigned NB  = 16;  // stage-2 nodes
  localparam int unsigned NC  = 8;   // stage-3 nodes
  localparam int unsigned NF  = 8;   // stage-4 nodes (outputs)

  localparam int unsigned BASE_A = NX;
  localparam int unsigned BASE_B = NX + NA;
  localparam int unsigned BASE_C = NX + NA + NB;

  // Fixed node operations of stages 2..4 (bit n set: node n subtracts).
  localparam logic [NB-1:0] S2_SUB = 16'hAAAA;       // + - + - ...
  localparam logic [NC-1:0] S3_SUB = 8'b0110_0110;   // + - - + + - - +
  localparam logic [NF-1:0] S4_SUB = 8'b1111_0000;   // + + + + - - - -

  // Number of passes a block of the given mode takes.
  function automatic int unsigned passes(mode_t m);
    return (m == M_HAD4 || m == M_FWD4 || m == M_INV4) ? 2 : 1;
  endfunction

  // ---------------------------------------------------------------------
  // Operand constructors
  // ---------------------------------------------------------------------
  function automatic operand_t opz();
    return '{zero: 1'b1, src: '0, sh: SH_NONE};
  endfunction

  function automatic operand_t opx(int unsigned i, shift_t s = SH_NONE);
    return '{zero: 1'b0, src: SRC_W'(i), sh: s};
  endfunction

  function automatic operand_t opa(int unsigned i, shift_t s = SH_NONE);
    return '{zero: 1'b0, src: SRC_W'(BASE_A + i), sh: s};
  endfunction

  function automatic operand_t opb(int unsigned i, shift_t s = SH_NONE);
    return '{zero: 1'b0, src: SRC_W'(BASE_B + i), sh: s};
  endfunction

  function automatic operand_t opc(int unsigned i, shift_t s = SH_NONE);
    return '{zero: 1'b0, src: SRC_W'(BASE_C + i), sh: s};
  endfunction

  function automatic node_route_t nr(operand_t a, operand_t b, logic sub = 1'b0);
    return '{a: a, b: b, sub: sub};
  endfunction

  // ---------------------------------------------------------------------
  // Stage 1: 12 nodes
  // ---------------------------------------------------------------------
  function automatic node_route_t route_s1(mode_t m, logic pass, int unsigned n);
    node_route_t r = nr(opz(), opz());
    case (m)
      M_INV8: begin
        // Scaled odd inputs; node n holds the published node named in
        // brackets: 0..3 are the four subtracting ones.
        case (n)
          0:  r = nr(opx(1), opx(1, SH_R2), 1'b1);           // [A3] 0.75 X1
          1:  r = nr(opx(7, SH_R2), opx(7), 1'b1);           // [A4] -0.75 X7
          2:  r = nr(opx(3, SH_R2), opx(3), 1'b1);           // [A7] -0.75 X3
          3:  r = nr(opx(5), opx(5, SH_R2), 1'b1);           // [A8] 0.75 X5
          4:  r = nr(opx(1), opx(1, SH_R1));                 // [A0] 1.5 X1
          5:  r = nr(opx(7), opx(7, SH_R1));                 // [A1] 1.5 X7
          6:  r = nr(opx(1), opx(1, SH_R2));                 // [A2] 1.25 X1
          7:  r = nr(opx(7, SH_R2), opx(7));                 // [A5] 1.25 X7
          8:  r = nr(opx(3, SH_R2), opx(3));                 // [A6] 1.25 X3
          9:  r = nr(opx(5), opx(5, SH_R2));                 // [A9] 1.25 X5
          10: r = nr(opx(3), opx(3, SH_R1));                 // [A10] 1.5 X3
          11: r = nr(opx(5), opx(5, SH_R1));                 // [A11] 1.5 X5
          default: ;
        endcase
      end
      M_FWD8: begin
        // a0..a3 = x_k + x_(7-k), a4..a7 = x_k - x_(7-k)
        if (n < 4)      r = nr(opx(n), opx(7 - n), 1'b0);
        else if (n < 8) r = nr(opx(n - 4), opx(11 - n), 1'b1);
      end
      M_INV4: begin
        // Pass 0: X0j + X2j and X1j + X3j/2 (rows 0 and 3 out).
        // Pass 1: X0j - X2j and X1j/2 - X3j (rows 1 and 2 out).
        if (n < 4)
          r = nr(opx(n), opx(8 + n), pass);
        else if (n < 8)
          r = pass ? nr(opx(n, SH_R1), opx(8 + n), 1'b1)
                   : nr(opx(n), opx(8 + n, SH_R1), 1'b0);
      end
      M_FWD4, M_HAD4: begin
        // Pass 0: X0j + X3j and X1j + X2j (rows 0 and 2 out).
        // Pass 1: X0j - X3j and X1j - X2j (rows 1 and 3 out).
        if (n < 4)      r = nr(opx(n), opx(12 + n), pass);
        else if (n < 8) r = nr(opx(n), opx(n + 4), pass);
      end
      M_HAD2: begin
        // First butterfly level: c00 +/- c01, c10 +/- c11
        case (n)
          0: r = nr(opx(0), opx(1), 1'b0);
          1: r = nr(opx(0), opx(1), 1'b1);
          2: r = nr(opx(2), opx(3), 1'b0);
          3: r = nr(opx(2), opx(3), 1'b1);
          default: ;
        endcase
      end
      default: ;
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Stage 2: 16 nodes, even ones add, odd ones subtract
  // ---------------------------------------------------------------------
  function automatic node_route_t route_s2(mode_t m, int unsigned n);
    node_route_t r = nr(opz(), opz());
    int unsigned h, k, ab;
    h  = n / 8;      // half (4x4 modes)
    k  = n % 8;      // node within half
    ab = 4 * h;      // first stage-1 node of that half
    case (m)
      M_INV8: begin
        case (n)
          0:  r = nr(opx(0), opx(4));                  // [B0]  X0 + X4
          1:  r = nr(opx(0), opx(4));                  // [B2]  X0 - X4
          2:  r = nr(opx(2), opx(6, SH_R1));           // [B1]  X2 + X6/2
          3:  r = nr(opx(6), opx(2, SH_R1));           // [B3]  X6 - X2/2
          4:  r = nr(opa(4), opa(5, SH_R2));           // [B4]
          5:  r = nr(opa(4, SH_R2), opa(5));           // [B5]
          6:  r = nr(opa(6), opa(1));                  // [B6]
          7:  r = nr(opa(10), opa(11, SH_R2));         // [B11]
          8:  r = nr(opa(0), opa(7));                  // [B7]
          10: r = nr(opa(8), opa(3));                  // [B8]
          12: r = nr(opa(2), opa(9));                  // [B9]
          14: r = nr(opa(11), opa(10, SH_R2));         // [B10]
          default: ;
        endcase
      end
      M_FWD8: begin
        case (n)
          0:  r = nr(opa(0), opa(3));                  // b0 = a0 + a3
          1:  r = nr(opa(0), opa(3));                  // b2 = a0 - a3
          2:  r = nr(opa(1), opa(2));                  // b1 = a1 + a2
          3:  r = nr(opa(1), opa(2));                  // b3 = a1 - a2
          4:  r = nr(opa(4), opa(4, SH_R1));           // 1.5 a4
          5:  r = nr(opa(4), opa(7));                  // a4 - a7
          6:  r = nr(opa(5), opa(5, SH_R1));           // 1.5 a5
          7:  r = nr(opa(5), opa(6));                  // a5 - a6
          8:  r = nr(opa(6), opa(6, SH_R1));           // 1.5 a6
          10: r = nr(opa(7), opa(7, SH_R1));           // 1.5 a7
          12: r = nr(opa(5), opa(6));                  // a5 + a6
          14: r = nr(opa(4), opa(7));                  // a4 + a7
          default: ;
        endcase
      end
      M_INV4: begin
        // Row transform of one half: pairs (A0,A1) and (A2,A3).
        case (k)
          0: r = nr(opa(ab),     opa(ab + 1));             // A0 + A1
          1: r = nr(opa(ab),     opa(ab + 1, SH_R1));      // A0 - A1/2
          2: r = nr(opa(ab),     opa(ab + 1, SH_R1));      // A0 + A1/2
          3: r = nr(opa(ab),     opa(ab + 1));             // A0 - A1
          4: r = nr(opa(ab + 2), opa(ab + 3, SH_R1));      // A2 + A3/2
          5: r = nr(opa(ab + 2), opa(ab + 3));             // A2 - A3
          6: r = nr(opa(ab + 2), opa(ab + 3));             // A2 + A3
          7: r = nr(opa(ab + 2), opa(ab + 3, SH_R1));      // A2 - A3/2
          default: ;
        endcase
      end
      M_FWD4: begin
        case (k)
          0: r = nr(opa(ab),            opa(ab + 1));            // A0 + A1
          1: r = nr(opa(ab),            opa(ab + 1));            // A0 - A1
          2: r = nr(opa(ab, SH_L1),     opa(ab + 1));            // 2A0 + A1
          3: r = nr(opa(ab),            opa(ab + 1, SH_L1));     // A0 - 2A1
          4: r = nr(opa(ab + 2),        opa(ab + 3));            // A2 + A3
          5: r = nr(opa(ab + 2),        opa(ab + 3));            // A2 - A3
          6: r = nr(opa(ab + 2),        opa(ab + 3, SH_L1));     // A2 + 2A3
          7: r = nr(opa(ab + 2, SH_L1), opa(ab + 3));            // 2A2 - A3
          default: ;
        endcase
      end
      M_HAD4: begin
        // Same paths as the 4x4 forward transform, without scaling.
        if (k < 4) r = nr(opa(ab),     opa(ab + 1));
        else       r = nr(opa(ab + 2), opa(ab + 3));
      end
      M_HAD2: begin
        case (n)
          0: r = nr(opa(0), opa(2));                   // y00
          1: r = nr(opa(0), opa(2));                   // y10
          2: r = nr(opa(1), opa(3));                   // y01
          3: r = nr(opa(1), opa(3));                   // y11
          default: ;
        endcase
      end
      default: ;
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Stage 3: 8 nodes, operations + - - + + - - +
  // ---------------------------------------------------------------------
  function automatic node_route_t route_s3(mode_t m, int unsigned n);
    node_route_t r = nr(opz(), opz());
    int unsigned bb;
    bb = 8 * (n / 4);
    case (m)
      M_INV8: begin
        case (n)
          0: r = nr(opb(0), opb(2));                   // [C0]
          1: r = nr(opb(0), opb(2));                   // [C1]
          2: r = nr(opb(1), opb(3));                   // [C2]
          3: r = nr(opb(1), opb(3));                   // [C3]
          4: r = nr(opb(4), opb(10));                  // [C4]
          5: r = nr(opb(6), opb(14));                  // [C6]
          6: r = nr(opb(8), opb(7));                   // [C7]
          7: r = nr(opb(5), opb(12));                  // [C5]
          default: ;
        endcase
      end
      M_FWD8: begin
        case (n)
          0: r = nr(opb(0), opb(2));                   // y0 = b0 + b1
          1: r = nr(opb(0), opb(2));                   // y4 = b0 - b1
          2: r = nr(opb(1, SH_R1), opb(3));            // y6 = b2/2 - b3
          3: r = nr(opb(1), opb(3, SH_R1));            // y2 = b2 + b3/2
          4: r = nr(opb(12), opb(4));                  // b4
          5: r = nr(opb(5), opb(8));                   // b5
          6: r = nr(opb(14), opb(6));                  // b6
          7: r = nr(opb(7), opb(10));                  // b7
          default: ;
        endcase
      end
      M_INV4, M_FWD4, M_HAD4: begin
        // Column j of one half: j=0 +, j=1 -, j=2 -, j=3 +.
        case (n % 4)
          0: r = nr(opb(bb + 0), opb(bb + 4));
          1: r = nr(opb(bb + 2), opb(bb + 6));
          2: r = nr(opb(bb + 1), opb(bb + 5));
          3: r = nr(opb(bb + 3), opb(bb + 7));
          default: ;
        endcase
      end
      M_HAD2: begin
        case (n)
          // results pass through as x + 0 or x - 0
          0: r = nr(opb(0), opz());                    // y00
          1: r = nr(opb(1), opz());                    // y10
          2: r = nr(opb(3), opz());                    // y11
          3: r = nr(opb(2), opz());                    // y01
          default: ;
        endcase
      end
      default: ;
    endcase
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Stage 4: 8 nodes, F0..F3 add, F4..F7 subtract
  // ---------------------------------------------------------------------
  function automatic node_route_t route_s4(mode_t m, logic pass, int unsigned n);
    node_route_t r = nr(opz(), opz());
    int unsigned j;
    j = n % 4;
    case (m)
      M_INV8: begin
        case (n)
          0: r = nr(opc(0), opc(4));                   // Y0
          1: r = nr(opc(2), opc(5));                   // Y1
          2: r = nr(opc(3), opc(6));                   // Y2
          3: r = nr(opc(1), opc(7));                   // Y3
          4: r = nr(opc(1), opc(7));                   // Y4
          5: r = nr(opc(3), opc(6));                   // Y5
          6: r = nr(opc(2), opc(5));                   // Y6
          7: r = nr(opc(0), opc(4));                   // Y7
          default: ;
        endcase
      end
      M_FWD8: begin
        case (n)
          0: r = nr(opc(0), opz());                    // y0
          1: r = nr(opc(4), opc(7, SH_R2));            // y1 = b4 + b7/4
          2: r = nr(opc(3), opz());                    // y2
          3: r = nr(opc(5), opc(6, SH_R2));            // y3 = b5 + b6/4
          4: r = nr(opc(1), opz());                    // y4
          5: r = nr(opc(6), opc(5, SH_R2));            // y5 = b6 - b5/4
          6: r = nr(opc(2), opz());                    // y6
          7: r = nr(opc(4, SH_R2), opc(7));            // y7 = b4/4 - b7
          default: ;
        endcase
      end
      M_INV4, M_HAD4: r = nr(opc(j), opc(4 + j));
      M_FWD4: begin
        if (!pass)      r = nr(opc(j), opc(4 + j));
        else if (n < 4) r = nr(opc(j, SH_L1), opc(4 + j));     // row 1
        else            r = nr(opc(j), opc(4 + j, SH_L1));     // row 3
      end
      M_HAD2: begin
        case (n)
          0: r = nr(opc(0), opz());                    // y00
          1: r = nr(opc(3), opz());                    // y01
          2: r = nr(opc(1), opz());                    // y10
          3: r = nr(opc(2), opz());                    // y11
          default: ;
        endcase
      end
      default: ;
    endcase
    return r;
  endfunction

  // Route of node n of stage s (1..4) for mode m and pass.
  function automatic node_route_t route(mode_t m, logic pass, int unsigned s, int unsigned n);
    case (s)
      1: return route_s1(m, pass, n);
      2: return route_s2(m, n);
      3: return route_s3(m, n);
      default: return route_s4(m, pass, n);
    endcase
  endfunction

endpackage
