// cgra_pkg: types and constants shared by the MRAM-configured CGRA.
//
// The array moves 32-bit words between processing elements (PEs) through
// schedule-driven switchboxes. A word on a link travels as a flit_t: a valid
// bit, a virtual-channel (VC) tag and 32 bits of data. Every link has a
// NUM_VC-bit ready signal running the other way, one bit per VC.
//
// The 32-bit data width and the 12-PE array size follow the architecture
// description; the VC count, the port numbering, the PE instruction word and
// the switchbox schedule-entry layout are this design's own choices.
package cgra_pkg;

  localparam int unsigned DATA_W    = 32;
  localparam int unsigned NUM_VC    = 4;
  localparam int unsigned VC_W      = 2;
  localparam int unsigned NUM_PORTS = 5;

  // Switchbox port numbering. PORT_L is the local PE.
  localparam int unsigned PORT_N = 0;
  localparam int unsigned PORT_E = 1;
  localparam int unsigned PORT_S = 2;
  localparam int unsigned PORT_W = 3;
  localparam int unsigned PORT_L = 4;

  typedef struct packed {
    logic              valid;
    logic [VC_W-1:0]   vc;
    logic [DATA_W-1:0] data;
  } flit_t;

  // ---------------------------------------------------------------------
  // PE instruction word (one configuration-memory word)
  //
  //  31..28 op      ALU operation, or LOOP / LI / HALT
  //  27..26 srca    operand A source
  //  25..24 srcb    operand B source
  //  23..21 dst     result destination
  //  20..19 ra      register for operand A (LI: target register)
  //  18..17 rb      register for operand B
  //  16..15 rd      destination register
  //  14..13 vc      VC used for SRC_PORT / DST_PORT
  //  12     ar_inc  post-increment the data-memory address register
  //  11..0  imm     sign-extended immediate
  //
  // LI   : dst <- zero-extended insn[15:0] (dst = REG(ra), AR or CNT)
  // LOOP : if CNT != 0 { CNT--, pc <- insn[14:0] } else pc++
  // HALT : stop until the next restart
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_AND   = 4'd2,
    OP_OR    = 4'd3,
    OP_XOR   = 4'd4,
    OP_SLL   = 4'd5,
    OP_SRL   = 4'd6,
    OP_SRA   = 4'd7,
    OP_SLT   = 4'd8,
    OP_SLTU  = 4'd9,
    OP_MUL   = 4'd10,
    OP_PASSA = 4'd11,
    OP_PASSB = 4'd12,
    OP_LOOP  = 4'd13,
    OP_LI    = 4'd14,
    OP_HALT  = 4'd15
  } op_e;

  typedef enum logic [1:0] {
    SRC_REG  = 2'd0,
    SRC_DMEM = 2'd1,
    SRC_PORT = 2'd2,
    SRC_IMM  = 2'd3
  } src_e;

  typedef enum logic [2:0] {
    DST_REG  = 3'd0,
    DST_DMEM = 3'd1,
    DST_PORT = 3'd2,
    DST_AR   = 3'd3,
    DST_CNT  = 3'd4,
    DST_NONE = 3'd5
  } dst_e;

  typedef struct packed {
    op_e             op;
    src_e            srca;
    src_e            srcb;
    dst_e            dst;
    logic [1:0]      ra;
    logic [1:0]      rb;
    logic [1:0]      rd;
    logic [VC_W-1:0] vc;
    logic            ar_inc;
    logic [11:0]     imm;
  } insn_t;

  // ---------------------------------------------------------------------
  // Switchbox schedule entry (one schedule-memory word, one per cycle)
  //
  // route[o] says what output port o sends this cycle:
  //   src      input port 0..4, or 5..7 for nothing
  //   from_buf 0: the word arriving now on port src (if its VC matches)
  //            1: the head of buffer src, virtual channel vc
  //   vc       VC of the word sent (and buffer VC read when from_buf)
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic [2:0]      src;
    logic            from_buf;
    logic [VC_W-1:0] vc;
  } route_t;

  typedef struct packed {
    logic [1:0]                   rsvd;
    route_t [NUM_PORTS-1:0]       route;
  } sched_entry_t;

  localparam logic [2:0] SRC_IDLE = 3'd7;

  // Helpers for building configuration words.
  function automatic logic [31:0] mk_alu(op_e op, src_e sa, src_e sb, dst_e d,
                                         logic [1:0] ra, logic [1:0] rb,
                                         logic [1:0] rd, logic [VC_W-1:0] vc,
                                         logic inc, logic [11:0] imm);
    insn_t i;
    i = '{op: op, srca: sa, srcb: sb, dst: d, ra: ra, rb: rb, rd: rd,
          vc: vc, ar_inc: inc, imm: imm};
    return i;
  endfunction

  function automatic logic [31:0] mk_li(dst_e d, logic [1:0] r, logic [15:0] v);
    logic [31:0] w;
    w        = '0;
    w[31:28] = OP_LI;
    w[23:21] = d;
    w[20:19] = r;
    w[15:0]  = v;
    return w;
  endfunction

  function automatic logic [31:0] mk_loop(logic [14:0] target);
    logic [31:0] w;
    w        = '0;
    w[31:28] = OP_LOOP;
    w[14:0]  = target;
    return w;
  endfunction

  function automatic logic [31:0] mk_halt();
    logic [31:0] w;
    w        = '0;
    w[31:28] = OP_HALT;
    return w;
  endfunction

  function automatic route_t mk_route(int unsigned src, logic from_buf,
                                      logic [VC_W-1:0] vc);
    route_t r;
    r.src      = 3'(src);
    r.from_buf = from_buf;
    r.vc       = vc;
    return r;
  endfunction

endpackage
