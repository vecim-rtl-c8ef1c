// cim_slot_mul: in-memory bit-parallel multiplier of one 16-bit VRF slot.
//
// How it works. Operand A is copied, inverted, into the CIM bits attached to
// the slot's bitcells; the CIM bits of a slot are chained into a ring shifter.
// Operand B stays where it is read from (the "knode"). Every bitline j then
// forms the partial-product bit B[j] AND A[(j-r) mod N] for the ring's current
// rotation r. Walking r through 0..N-1 produces all N*N partial products of an
// N x N unsigned multiplication, one diagonal per rotation.
//
// Double rate: there are two CIM-bit rings. Ring 0 is loaded with A, ring 1
// with A rotated left by one; each multiply cycle both rings rotate left by
// two. Cycle k therefore delivers rotations 2k (and0_o) and 2k+1 (and1_o), and
// an N-bit multiplication takes N/2 cycles: 4 for 8-bit, 5 for 10-bit. After
// the last cycle both rings are back at their starting rotation, so a_o still
// presents the (true) copied operand.
//
// Ring configurations (mode_i):
//   RING_INT8: two independent 8-bit rings on bits [7:0] and [15:8]
//   RING_BF16: one 8-bit ring on [7:0]; bit 7 (the exponent LSB in BF16) is
//              replaced by the hidden 1 so the ring multiplies 1.m x 1.m
//   RING_FP16: one 10-bit ring on [9:0] (the stored mantissa bits; the hidden
//              1 terms are added near memory)
// The ring split, the 10-bit FP16 ring and the double rate follow the
// described design; loading ring 1 pre-rotated and the BF16 hidden-bit
// substitution are this implementation's choices.
//
// Timing: copy_i loads the rings and keep_i the knode at the clock edge;
// and0_o/and1_o are combinational from the current ring and knode; shift_i
// advances both rings by two at the edge.
module cim_slot_mul
  import vecim_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  ring_mode_e         mode_i,
  input  logic               copy_i,     // load operand A into the CIM bits
  input  logic               keep_i,     // latch operand B at the knode
  input  logic               shift_i,    // rotate both rings by two
  input  logic [SLOT_W-1:0]  a_i,
  input  logic [SLOT_W-1:0]  b_i,
  output logic [SLOT_W-1:0]  and0_o,     // bitline AND, rotation 2k
  output logic [SLOT_W-1:0]  and1_o,     // bitline AND, rotation 2k+1
  output logic [SLOT_W-1:0]  a_o,        // operand A as held by ring 0
  output logic [SLOT_W-1:0]  b_o         // operand B as held at the knode
);

  // CIM bits hold the inverted copy (QB) of operand A.
  logic [SLOT_W-1:0] ring0_qb, ring1_qb, knode;

  // Operand as seen by the ring in the given configuration.
  function automatic logic [SLOT_W-1:0] ring_view(input logic [SLOT_W-1:0] v,
                                                   input ring_mode_e m);
    case (m)
      RING_BF16: return {8'h00, 1'b1, v[6:0]};
      RING_FP16: return {6'h00, v[9:0]};
      default:   return v;
    endcase
  endfunction

  // Rotate left by one inside the active ring(s); inactive bits keep value.
  function automatic logic [SLOT_W-1:0] rotl1(input logic [SLOT_W-1:0] v,
                                               input ring_mode_e m);
    logic [SLOT_W-1:0] r;
    r = v;
    case (m)
      RING_FP16: r[9:0] = {v[8:0], v[9]};
      RING_BF16: r[7:0] = {v[6:0], v[7]};
      default: begin
        r[7:0]  = {v[6:0],  v[7]};
        r[15:8] = {v[14:8], v[15]};
      end
    endcase
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring0_qb <= '1;
      ring1_qb <= '1;
      knode    <= '0;
    end else begin
      if (copy_i) begin
        ring0_qb <= ~ring_view(a_i, mode_i);
        ring1_qb <= ~rotl1(ring_view(a_i, mode_i), mode_i);
      end else if (shift_i) begin
        ring0_qb <= rotl1(rotl1(ring0_qb, mode_i), mode_i);
        ring1_qb <= rotl1(rotl1(ring1_qb, mode_i), mode_i);
      end
      if (keep_i) knode <= ring_view(b_i, mode_i);
    end
  end

  assign and0_o = ~ring0_qb & knode;
  assign and1_o = ~ring1_qb & knode;
  assign a_o    = ~ring0_qb;
  assign b_o    = knode;

endmodule
