// ec_pkg: types and constants shared by the execution-cache (EC) processor
// back end.
//
// The EC stores instructions that have already been fetched, decoded, renamed
// and scheduled, in the order they were issued, so that later executions of
// the same code can skip the whole front end.  This package holds the record
// formats of the two EC arrays and of the instruction bundles that flow
// between rename, issue, the EC and the execution units.
//
// Field widths of the data-array record follow the published layout: per
// instruction a 48-bit decoded instruction, 6 renaming bits (2 per register),
// a 10-bit trace tag, a 6-bit retire position and a 1-bit sequence id; per
// block the number of issue units (3 bits), a 32-bit trace id and a 2-bit
// block type, eight instructions per block (605 bits, 76 bytes).  The tag
// array entry holds a 64-bit start address, an 8-bit start set, a 32-bit trace
// id and a 2-bit mispredict count.
//
// Own choices: the split of the 48-bit decoded instruction into fields (an
// Alpha-like three-register format), the opcode value 0 reserved for an empty
// block slot, and the fourth block-type code for a trace of a single block.
package ec_pkg;

  // machine width: eight-way issue, eight instructions per EC block
  localparam int ISSUE_W     = 8;
  localparam int BLOCK_INSTR = 8;

  // architected registers and the physical registers behind each of them
  localparam int NARCH   = 32;
  localparam int NPHYS   = 4;
  localparam int AREG_W  = $clog2(NARCH);
  localparam int PTAG_W  = $clog2(NPHYS);

  // data array record fields
  localparam int DEC_W      = 48;
  localparam int TTAG_W     = 10;
  localparam int RPOS_W     = 6;
  localparam int NIU_W      = 3;
  localparam int TRACE_ID_W = 32;

  // tag array record fields
  localparam int PC_W    = 64;
  localparam int SETID_W = 8;
  localparam int MCNT_W  = 2;

  // longest trace the build logic may create
  localparam int MAX_TRACE_LEN = 512;

  // Decoded instruction: 48 bits.  op == 0 marks an empty slot.
  typedef struct packed {
    logic [5:0]        op;
    logic              wr;     // writes rd
    logic [AREG_W-1:0] rd;
    logic [AREG_W-1:0] rs1;
    logic [AREG_W-1:0] rs2;
    logic [25:0]       imm;
  } dec_t;

  // Renaming information: one physical-register tag per operand.
  typedef struct packed {
    logic [PTAG_W-1:0] dst;
    logic [PTAG_W-1:0] src1;
    logic [PTAG_W-1:0] src2;
  } ren_t;

  // One instruction as stored in the EC (71 bits).
  typedef struct packed {
    dec_t              dec;
    ren_t              ren;
    logic [TTAG_W-1:0] ttag;   // position in program order inside the trace
    logic [RPOS_W-1:0] rpos;   // retire-buffer slot given at rename
    logic              seq;    // equal inside an issue unit, toggles between units
  } ec_instr_t;

  typedef enum logic [1:0] {
    BT_FIRST  = 2'd0,
    BT_MIDDLE = 2'd1,
    BT_LAST   = 2'd2,
    BT_SINGLE = 2'd3   // first and last block of a one-block trace
  } blk_type_e;

  // One data-array block (605 bits).
  typedef struct packed {
    ec_instr_t [BLOCK_INSTR-1:0] slot;
    logic [NIU_W-1:0]            n_iu;
    logic [TRACE_ID_W-1:0]       trace_id;
    blk_type_e                   btype;
  } ec_block_t;

  // One tag-array entry (106 bits, 14 bytes).
  typedef struct packed {
    logic                  valid;
    logic [PC_W-1:0]       pc;
    logic [SETID_W-1:0]    set_id;
    logic [TRACE_ID_W-1:0] trace_id;
    logic [MCNT_W-1:0]     mcnt;
  } ta_entry_t;

  // Operations on the tag array, one per cycle.
  typedef enum logic [2:0] {
    TA_NOP     = 3'd0,
    TA_LOOKUP  = 3'd1,  // search for a trace starting at pc
    TA_INSERT  = 3'd2,  // record a newly built trace
    TA_MISPRED = 3'd3,  // count a mispredict on the trace at pc
    TA_SUCCESS = 3'd4,  // trace ran to its end: clear its count
    TA_INVAL   = 3'd5   // drop the trace at pc
  } ta_op_e;

  typedef enum logic [2:0] {
    M_DRAIN  = 3'd0,   // wait for the pipeline to empty at a trace end
    M_CKPT   = 3'd1,   // register-file checkpoint and tag-array look-up
    M_LRESP  = 3'd2,   // look-up result
    M_BUILD  = 3'd3,   // front end running, trace being built
    M_EC     = 3'd4    // instructions come from the EC
  } mode_e;

  function automatic logic is_empty_slot(ec_instr_t i);
    return i.dec.op == 6'd0;
  endfunction

endpackage
