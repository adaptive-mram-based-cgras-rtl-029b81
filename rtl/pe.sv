// pe: processing element of the CGRA - a 32-bit ALU, a data memory and a
// configuration memory that holds the PE's program.
//
// How it works. Each configuration-memory word is one instruction (format in
// cgra_pkg). An instruction takes two cycles: in FETCH the configuration
// memory is read at pc and the data memory at the address register ar; in
// EXEC the instruction picks its two operands (a register, the data word at
// ar, the head of an input VC, or the immediate), the ALU combines them and
// the result goes to a register, to the data memory at ar, to the switchbox
// (as a flit on the chosen VC), to ar or to the loop counter. EXEC waits as
// long as an operand VC is empty or the output VC is not ready; that is the
// PE's flow-control stall. LOOP gives counted loops, LI loads 16-bit
// constants, HALT stops the PE.
//
// Interface. hold freezes the PE (used while the configuration loader writes
// cfg_*); restart sets pc to 0 and starts execution. After reset the PE is
// halted. in_flit/in_ready connect to the switchbox local output and feed a
// per-VC input buffer; out_flit/out_ready connect to the switchbox local input.
// out_flit is registered and valid for one cycle per word.
//
// What follows the architecture: the 32-bit ALU, the 36K-word data memory,
// the 24K-word configuration memory, configuration words that connect the ALU
// and the data memory. The instruction set and two-cycle sequencing are this
// design's own.
module pe
  import cgra_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 36864,
  parameter int unsigned CMEM_DEPTH = 24576,
  parameter int unsigned BUF_DEPTH  = 4,
  localparam int unsigned DAW = $clog2(DMEM_DEPTH),
  localparam int unsigned CAW = $clog2(CMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold,
  input  logic              restart,
  input  logic              cfg_we,
  input  logic [CAW-1:0]    cfg_addr,
  input  logic [DATA_W-1:0] cfg_wdata,
  input  flit_t             in_flit,
  output logic [NUM_VC-1:0] in_ready,
  output flit_t             out_flit,
  input  logic [NUM_VC-1:0] out_ready,
  output logic              halted
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC} state_e;

  state_e            state;
  logic [CAW-1:0]    pc;
  logic [DAW-1:0]    ar;
  logic [DATA_W-1:0] cnt;
  logic [DATA_W-1:0] regs [4];

  // --- memories --------------------------------------------------------
  logic [DATA_W-1:0] cmem_q, dmem_q;
  logic              dmem_we;
  logic [DATA_W-1:0] result;
  logic              fetch;

  assign fetch = (state == S_FETCH) && !hold;

  sdp_ram #(.DEPTH(CMEM_DEPTH), .WIDTH(DATA_W)) u_cmem (
    .clk, .we(cfg_we), .waddr(cfg_addr), .wdata(cfg_wdata),
    .re(fetch), .raddr(pc), .rdata(cmem_q)
  );

  sdp_ram #(.DEPTH(DMEM_DEPTH), .WIDTH(DATA_W)) u_dmem (
    .clk, .we(dmem_we), .waddr(ar), .wdata(result),
    .re(fetch), .raddr(ar), .rdata(dmem_q)
  );

  // --- input buffer from the switchbox ----------------------------------
  logic [NUM_VC-1:0]             in_pop;
  logic [NUM_VC-1:0]             in_valid;
  logic [NUM_VC-1:0][DATA_W-1:0] in_data;

  vc_buffer #(.NVC(NUM_VC), .DEPTH(BUF_DEPTH)) u_inbuf (
    .clk, .rst_n, .in_flit, .in_take(1'b0), .ready(in_ready),
    .pop(in_pop), .head_valid(in_valid), .head_data(in_data)
  );

  // --- decode / execute ---------------------------------------------------
  insn_t             ins;
  logic [DATA_W-1:0] opa, opb, imm_x;
  logic              is_alu, need_port, port_ok, out_ok, fire;

  assign ins    = insn_t'(cmem_q);
  assign imm_x  = {{(DATA_W-12){ins.imm[11]}}, ins.imm};
  assign is_alu = (ins.op != OP_LOOP) && (ins.op != OP_LI) && (ins.op != OP_HALT);

  function automatic logic [DATA_W-1:0] operand(src_e s, logic [1:0] r,
                                                logic [DATA_W-1:0] dq,
                                                logic [DATA_W-1:0] pq,
                                                logic [DATA_W-1:0] iq);
    unique case (s)
      SRC_REG:  return regs[r];
      SRC_DMEM: return dq;
      SRC_PORT: return pq;
      default:  return iq;
    endcase
  endfunction

  always_comb begin
    opa       = operand(ins.srca, ins.ra, dmem_q, in_data[ins.vc], imm_x);
    opb       = operand(ins.srcb, ins.rb, dmem_q, in_data[ins.vc], imm_x);
    need_port = is_alu && (ins.srca == SRC_PORT || ins.srcb == SRC_PORT);
    port_ok   = !need_port || in_valid[ins.vc];
    out_ok    = !(is_alu && ins.dst == DST_PORT) || out_ready[ins.vc];
    fire      = (state == S_EXEC) && !hold && port_ok && out_ok;
    dmem_we   = fire && is_alu && (ins.dst == DST_DMEM);
    in_pop    = '0;
    if (fire && need_port) in_pop[ins.vc] = 1'b1;
  end

  alu u_alu (.op(ins.op), .a(opa), .b(opb), .y(result));

  assign halted = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      ar       <= '0;
      cnt      <= '0;
      out_flit <= '0;
      for (int r = 0; r < 4; r++) regs[r] <= '0;
    end else begin
      out_flit.valid <= 1'b0;
      if (restart) begin
        state <= S_FETCH;
        pc    <= '0;
      end else if (fetch) begin
        state <= S_EXEC;
      end else if (fire) begin
        state <= S_FETCH;
        pc    <= pc + 1'b1;
        unique case (ins.op)
          OP_HALT: state <= S_IDLE;
          OP_LOOP: if (cnt != '0) begin
                     cnt <= cnt - 1'b1;
                     pc  <= CAW'(cmem_q[14:0]);
                   end
          OP_LI: begin
            unique case (ins.dst)
              DST_REG: regs[ins.ra] <= DATA_W'(cmem_q[15:0]);
              DST_AR:  ar           <= DAW'(cmem_q[15:0]);
              DST_CNT: cnt          <= DATA_W'(cmem_q[15:0]);
              default: ;
            endcase
          end
          default: begin
            if (ins.ar_inc) ar <= ar + 1'b1;
            unique case (ins.dst)
              DST_REG:  regs[ins.rd] <= result;
              DST_PORT: out_flit     <= '{valid: 1'b1, vc: ins.vc, data: result};
              DST_AR:   ar           <= DAW'(result);
              DST_CNT:  cnt          <= result;
              default: ;
            endcase
          end
        endcase
      end
    end
  end

endmodule
