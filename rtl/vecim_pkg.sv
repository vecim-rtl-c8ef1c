// vecim_pkg: types and constants shared by the vector co-processor with a
// compute-in-memory (CIM) vector register file.
//
// The VRF is LANES lanes x NBANK banks x BANK_WORDS words of 64 bits
// (4 x 8 x 64 x 64 b = 4 x 8 x 4 kb). Every operation in this design works on
// one VRF "row": the same word address in every bank of every lane. The
// instruction format below is already decoded (the host CPU / Ara front end
// decodes the RISC-V vector encoding); register fields name rows.
//
// Element layout inside a 64-bit bank word: INT8 element i in bits [8i+7:8i],
// 16-bit (BF16/FP16) element i in bits [16i+15:16i]. A 16-bit "slot" of the
// word owns one CIM multiplier.
package vecim_pkg;

  localparam int unsigned WORD_W     = 64;   // bank word / lane memory beat
  localparam int unsigned SLOT_W     = 16;
  localparam int unsigned NSLOT      = WORD_W / SLOT_W;
  localparam int unsigned ROW_AW     = 6;    // 64 words per 4 kb bank
  localparam int unsigned ID_W       = 4;    // instruction tag returned with the ack
  localparam int unsigned NQ         = 3;    // MEM, CIM, ARITH queues

  // Operations executed inside a CIM VRF bank.
  typedef enum logic [2:0] {
    CIM_NONE      = 3'd0,
    CIM_VMACC_I8  = 3'd1,  // vd[i] += vs1[i]*vs2[i], signed INT8, 8-bit result
    CIM_VDOT_I8   = 3'd2,  // extension: vd32[k] += sum of 4 INT8 products
    CIM_VFMACC_BF = 3'd3,  // vd[i] += vs1[i]*vs2[i], BF16, single rounding
    CIM_VFMUL_HF  = 3'd4,  // vd[i]  = vs1[i]*vs2[i], FP16
    CIM_VFADD_BF  = 3'd5,  // vd[i]  = vs2[i]+vs1[i], BF16 near-memory add
    CIM_VFADD_HF  = 3'd6   // vd[i]  = vs2[i]+vs1[i], FP16 near-memory add
  } cim_op_e;

  // Ring configuration of the CIM bits of one 16-bit slot.
  typedef enum logic [1:0] {
    RING_INT8 = 2'd0,  // two 8-bit rings, bits [7:0] and [15:8]
    RING_BF16 = 2'd1,  // one 8-bit ring on [7:0], bit 7 replaced by the hidden 1
    RING_FP16 = 2'd2   // one 10-bit ring on [9:0]
  } ring_mode_e;

  // Near-memory floating point operation of one slot.
  typedef enum logic [1:0] {
    FP_MAC_BF = 2'd0,
    FP_MUL_HF = 2'd1,
    FP_ADD_BF = 2'd2,
    FP_ADD_HF = 2'd3
  } fp_mode_e;

  // Queue class of a vector instruction (one issue queue each).
  typedef enum logic [1:0] {
    Q_MEM   = 2'd0,
    Q_CIM   = 2'd1,
    Q_ARITH = 2'd2
  } qclass_e;

  typedef enum logic [3:0] {
    V_VLE         = 4'd0,   // load one row from memory
    V_VSE         = 4'd1,   // store one row to memory
    V_VMACC_I8    = 4'd2,
    V_VDOT_I8     = 4'd3,
    V_VFMACC_BF   = 4'd4,
    V_VFMUL_HF    = 4'd5,
    V_VFADD_BF    = 4'd6,
    V_VFADD_HF    = 4'd7,
    V_ARITH       = 4'd8    // any instruction for the lane ALU/FPU or slide unit
  } vop_e;

  typedef struct packed {
    vop_e              op;
    logic [ROW_AW-1:0] vd;
    logic [ROW_AW-1:0] vs1;
    logic [ROW_AW-1:0] vs2;
    logic [31:0]       scalar;   // scalar operand (memory beat address for loads/stores)
    logic [3:0]        fn;       // function code passed to the ARITH units
    logic [ID_W-1:0]   id;
  } vinstr_t;

  // Number of multiply cycles of each CIM operation (double-rate: two ring
  // rotations per cycle, so an N-bit ring needs N/2 cycles).
  localparam int unsigned MUL_CYC_8  = 4;
  localparam int unsigned MUL_CYC_10 = 5;

  // Bank-side schedule of each CIM operation, counted in steps after the
  // cycle in which the bank accepts it (step 0 is the next cycle).
  //   MAC ops : COPY, KEEP, MUL x4, ADD(read op3), WB      -> 8 steps
  //   FP16 mul: COPY, KEEP, MUL x5, ADJUST, WB             -> 9 steps
  //   FP add  : READ a, READ b, ADD, WB                    -> 4 steps
  function automatic int unsigned cim_steps(cim_op_e op);
    case (op)
      CIM_VFMUL_HF:               return 9;
      CIM_VFADD_BF, CIM_VFADD_HF: return 4;
      default:                    return 8;
    endcase
  endfunction

  function automatic qclass_e qclass_of(vop_e op);
    case (op)
      V_VLE, V_VSE: return Q_MEM;
      V_ARITH:      return Q_ARITH;
      default:      return Q_CIM;
    endcase
  endfunction

  function automatic cim_op_e cim_op_of(vop_e op);
    case (op)
      V_VMACC_I8:  return CIM_VMACC_I8;
      V_VDOT_I8:   return CIM_VDOT_I8;
      V_VFMACC_BF: return CIM_VFMACC_BF;
      V_VFMUL_HF:  return CIM_VFMUL_HF;
      V_VFADD_BF:  return CIM_VFADD_BF;
      V_VFADD_HF:  return CIM_VFADD_HF;
      default:     return CIM_NONE;
    endcase
  endfunction

endpackage
