// ua_route: mux-based routing network in front of one stage of the unified
// H.264 transform architecture.
//
// For every shared node of the stage it delivers two operands. Each operand is
// built the way the low-cost routing multiplexer is built: a small constant
// lookup, driven by the 3-bit transform select (and the pass number of the
// 4x4 transforms), produces the select code, and that code steers a data
// multiplexer over the signals the stage can see. Since the select code
// depends only on mode and pass, synthesis keeps only the input paths that
// some mode actually uses. The operand is then scaled by a wired shift
// (>>>1, >>>2 or <<1) or forced to zero, as the table says; the shift
// amount of an operand is part of its routing entry, not a shared shifter.
// The routing table itself is h264_tx_pkg::route.
//
// Interface: src holds the NSRC signals visible to the stage (primary inputs
// first, then the outputs of the earlier stages, see h264_tx_pkg). op_a/op_b
// are the node operands, sub the add/subtract control (meaningful in stage 1
// only; later stages have fixed node operations).
// Timing: purely combinational.
module ua_route
  import h264_tx_pkg::*;
#(
  parameter int unsigned W     = 16,  // data width, two's complement
  parameter int unsigned STAGE = 1,   // 1..4
  parameter int unsigned NSRC  = NX,  // signals visible to this stage
  parameter int unsigned NNODE = NA   // nodes in this stage
) (
  input  mode_t                 mode,
  input  logic                  pass,
  input  logic signed [W-1:0]   src  [NSRC],
  output logic signed [W-1:0]   op_a [NNODE],
  output logic signed [W-1:0]   op_b [NNODE],
  output logic [NNODE-1:0]      sub
);

  function automatic logic signed [W-1:0] fetch(operand_t o,
                                                logic signed [W-1:0] s [NSRC]);
    logic signed [W-1:0] v;
    if (o.zero || o.src >= SRC_W'(NSRC)) return '0;
    v = s[int'(o.src)];
    case (o.sh)
      SH_R1:   return v >>> 1;
      SH_R2:   return v >>> 2;
      SH_L1:   return v <<< 1;
      default: return v;
    endcase
  endfunction

  always_comb begin
    for (int unsigned n = 0; n < NNODE; n++) begin
      node_route_t r;
      r       = route(mode, pass, STAGE, n);
      op_a[n] = fetch(r.a, src);
      op_b[n] = fetch(r.b, src);
      sub[n]  = r.sub;
    end
  end

endmodule
