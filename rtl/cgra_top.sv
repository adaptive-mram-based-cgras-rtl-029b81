// cgra_top: coarse-grained reconfigurable array with an MRAM configuration
// cache.
//
// Structure. ROWS x COLS PE/switchbox pairs form a 2-D mesh: switchbox (r,c)
// links to its four neighbours and to its own PE. Each row has one MRAM bank
// of BANK_DEPTH words of 32*COLS bits and one config_loader, so a bank holds
// configurations for the COLS pairs of its row and writes all of them at once,
// one 32-bit lane per pair. The default 3 x 4 array with three 256K x 128 banks
// is the 12-PE, three-bank (4 MB each) system of the architecture.
//
// Host side (the control microprocessor, outside this module):
//   * host_*  reads and writes MRAM words of bank host_bank. A host request is
//             passed to the bank only while that bank's loader is idle;
//             host_ready reports when it was accepted.
//   * cfg_*   starts a reconfiguration: every bank whose bit is set in
//             cfg_bank_mask loads the configuration at cfg_base (cfg_pe_len
//             PE words, then cfg_sb_len schedule words). Those rows are held
//             while loading and restart from pc 0 / schedule entry 0 when done.
//             cfg_busy is high while any loader works; cfg_done pulses per
//             finished bank.
// Array edges: the N ports of row 0, the S ports of the last row, the W ports
// of column 0 and the E ports of the last column are brought out as links
// (flit_t plus per-VC ready), for streams to and from DRAM. An unused input
// link must be driven with valid = 0, and an unused ready input with 0.
//
// The array size, bank shape, number of PEs per bank, memory sizes and
// reconfiguring all pairs of a bank together follow the architecture. The row
// grouping, the edge links and the host interface are this design's own.
module cgra_top
  import cgra_pkg::*;
#(
  parameter int unsigned ROWS        = 3,
  parameter int unsigned COLS        = 4,
  parameter int unsigned DMEM_DEPTH  = 36864,
  parameter int unsigned CMEM_DEPTH  = 24576,
  parameter int unsigned SCHED_DEPTH = 512,
  parameter int unsigned BUF_DEPTH   = 4,
  parameter int unsigned BANK_DEPTH  = 262144,
  parameter int unsigned READ_PS     = 1670,
  parameter int unsigned WRITE_PS    = 5880,
  parameter int unsigned CLK_PS      = 4000,
  localparam int unsigned BANK_W = COLS * DATA_W,
  localparam int unsigned BAW    = $clog2(BANK_DEPTH),
  localparam int unsigned CAW    = $clog2(CMEM_DEPTH),
  localparam int unsigned SAW    = $clog2(SCHED_DEPTH),
  localparam int unsigned RW     = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host access to the MRAM banks
  input  logic                         host_req,
  input  logic                         host_we,
  input  logic [RW-1:0]                host_bank,
  input  logic [BAW-1:0]               host_addr,
  input  logic [BANK_W-1:0]            host_wdata,
  output logic                         host_ready,
  output logic                         host_rvalid,
  output logic [BANK_W-1:0]            host_rdata,
  // reconfiguration command
  input  logic                         cfg_start,
  input  logic [ROWS-1:0]              cfg_bank_mask,
  input  logic [BAW-1:0]               cfg_base,
  input  logic [CAW:0]                 cfg_pe_len,
  input  logic [SAW:0]                 cfg_sb_len,
  output logic                         cfg_busy,
  output logic [ROWS-1:0]              cfg_done,
  // array-edge links
  input  flit_t [COLS-1:0]             north_in,
  output logic  [COLS-1:0][NUM_VC-1:0] north_in_ready,
  output flit_t [COLS-1:0]             north_out,
  input  logic  [COLS-1:0][NUM_VC-1:0] north_out_ready,
  input  flit_t [COLS-1:0]             south_in,
  output logic  [COLS-1:0][NUM_VC-1:0] south_in_ready,
  output flit_t [COLS-1:0]             south_out,
  input  logic  [COLS-1:0][NUM_VC-1:0] south_out_ready,
  input  flit_t [ROWS-1:0]             west_in,
  output logic  [ROWS-1:0][NUM_VC-1:0] west_in_ready,
  output flit_t [ROWS-1:0]             west_out,
  input  logic  [ROWS-1:0][NUM_VC-1:0] west_out_ready,
  input  flit_t [ROWS-1:0]             east_in,
  output logic  [ROWS-1:0][NUM_VC-1:0] east_in_ready,
  output flit_t [ROWS-1:0]             east_out,
  input  logic  [ROWS-1:0][NUM_VC-1:0] east_out_ready,
  // status
  output logic  [ROWS*COLS-1:0]        pe_halted
);

  // switchbox-side link arrays, indexed [row][col][port]
  flit_t [ROWS-1:0][COLS-1:0][NUM_PORTS-1:0]             sb_in, sb_out;
  logic  [ROWS-1:0][COLS-1:0][NUM_PORTS-1:0][NUM_VC-1:0] sb_in_ready, sb_out_ready;

  logic [ROWS-1:0] host_sel, host_rv;
  logic [ROWS-1:0][BANK_W-1:0] bank_rdata;
  logic [ROWS-1:0] bank_ready, ld_busy;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    // ---- configuration cache bank and its loader -----------------------
    logic           ld_restart, ld_req, ld_start;
    logic [BAW-1:0] ld_addr;
    logic [SAW:0]   ld_sched_len;
    logic           cfg_we, sch_we;
    logic [CAW-1:0] cfg_addr;
    logic [SAW-1:0] sch_addr;
    logic [COLS-1:0][DATA_W-1:0] cfg_wdata, sch_wdata;
    logic           m_req, m_we, m_rvalid;
    logic [BAW-1:0] m_addr;

    assign ld_start    = cfg_start && cfg_bank_mask[r];
    assign host_sel[r] = host_req && (32'(host_bank) == r) && !ld_busy[r] && !ld_start;
    assign m_req       = ld_busy[r] ? ld_req  : host_sel[r];
    assign m_we        = ld_busy[r] ? 1'b0    : host_we;
    assign m_addr      = ld_busy[r] ? ld_addr : host_addr;

    mram_bank #(.DEPTH(BANK_DEPTH), .WIDTH(BANK_W), .READ_PS(READ_PS),
                .WRITE_PS(WRITE_PS), .CLK_PS(CLK_PS)) u_bank (
      .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(host_wdata),
      .ready(bank_ready[r]), .rvalid(m_rvalid), .rdata(bank_rdata[r])
    );

    // remember whose read is in flight
    logic host_pending;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                       host_pending <= 1'b0;
      else if (host_sel[r] && bank_ready[r] && !host_we) host_pending <= 1'b1;
      else if (m_rvalid)                                host_pending <= 1'b0;
    end
    assign host_rv[r] = m_rvalid && host_pending;

    config_loader #(.LANES(COLS), .BANK_DEPTH(BANK_DEPTH), .CMEM_DEPTH(CMEM_DEPTH),
                    .SCHED_DEPTH(SCHED_DEPTH)) u_loader (
      .clk, .rst_n, .start(ld_start), .base(cfg_base), .pe_len(cfg_pe_len),
      .sb_len(cfg_sb_len), .busy(ld_busy[r]), .done(cfg_done[r]),
      .restart(ld_restart), .sched_len(ld_sched_len),
      .m_req(ld_req), .m_addr(ld_addr), .m_ready(bank_ready[r]),
      .m_rvalid(m_rvalid && !host_pending), .m_rdata(bank_rdata[r]),
      .cfg_we, .cfg_addr, .cfg_wdata, .sch_we, .sch_addr, .sch_wdata
    );

    // ---- the row's PE/switchbox pairs ------------------------------------
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pe #(.DMEM_DEPTH(DMEM_DEPTH), .CMEM_DEPTH(CMEM_DEPTH), .BUF_DEPTH(BUF_DEPTH)) u_pe (
        .clk, .rst_n, .hold(ld_busy[r]), .restart(ld_restart),
        .cfg_we, .cfg_addr, .cfg_wdata(cfg_wdata[c]),
        .in_flit(sb_out[r][c][PORT_L]), .in_ready(sb_out_ready[r][c][PORT_L]),
        .out_flit(sb_in[r][c][PORT_L]), .out_ready(sb_in_ready[r][c][PORT_L]),
        .halted(pe_halted[r*COLS+c])
      );

      switchbox #(.SCHED_DEPTH(SCHED_DEPTH), .BUF_DEPTH(BUF_DEPTH)) u_sb (
        .clk, .rst_n, .hold(ld_busy[r]), .restart(ld_restart),
        .sch_we, .sch_addr, .sch_wdata(sch_wdata[c]), .sched_len(ld_sched_len),
        .in_flit(sb_in[r][c]), .in_ready(sb_in_ready[r][c]),
        .out_flit(sb_out[r][c]), .out_ready(sb_out_ready[r][c])
      );

      // north side
      if (r == 0) begin : g_n_edge
        assign sb_in[r][c][PORT_N]        = north_in[c];
        assign north_in_ready[c]          = sb_in_ready[r][c][PORT_N];
        assign north_out[c]               = sb_out[r][c][PORT_N];
        assign sb_out_ready[r][c][PORT_N] = north_out_ready[c];
      end else begin : g_n_link
        assign sb_in[r][c][PORT_N]        = sb_out[r-1][c][PORT_S];
        assign sb_out_ready[r][c][PORT_N] = sb_in_ready[r-1][c][PORT_S];
      end
      // south side
      if (r == ROWS-1) begin : g_s_edge
        assign sb_in[r][c][PORT_S]        = south_in[c];
        assign south_in_ready[c]          = sb_in_ready[r][c][PORT_S];
        assign south_out[c]               = sb_out[r][c][PORT_S];
        assign sb_out_ready[r][c][PORT_S] = south_out_ready[c];
      end else begin : g_s_link
        assign sb_in[r][c][PORT_S]        = sb_out[r+1][c][PORT_N];
        assign sb_out_ready[r][c][PORT_S] = sb_in_ready[r+1][c][PORT_N];
      end
      // west side
      if (c == 0) begin : g_w_edge
        assign sb_in[r][c][PORT_W]        = west_in[r];
        assign west_in_ready[r]           = sb_in_ready[r][c][PORT_W];
        assign west_out[r]                = sb_out[r][c][PORT_W];
        assign sb_out_ready[r][c][PORT_W] = west_out_ready[r];
      end else begin : g_w_link
        assign sb_in[r][c][PORT_W]        = sb_out[r][c-1][PORT_E];
        assign sb_out_ready[r][c][PORT_W] = sb_in_ready[r][c-1][PORT_E];
      end
      // east side
      if (c == COLS-1) begin : g_e_edge
        assign sb_in[r][c][PORT_E]        = east_in[r];
        assign east_in_ready[r]           = sb_in_ready[r][c][PORT_E];
        assign east_out[r]                = sb_out[r][c][PORT_E];
        assign sb_out_ready[r][c][PORT_E] = east_out_ready[r];
      end else begin : g_e_link
        assign sb_in[r][c][PORT_E]        = sb_out[r][c+1][PORT_W];
        assign sb_out_ready[r][c][PORT_E] = sb_in_ready[r][c+1][PORT_W];
      end
    end
  end

  // ---- host read/ready return --------------------------------------------
  always_comb begin
    host_ready  = 1'b0;
    host_rvalid = 1'b0;
    host_rdata  = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (host_sel[r] && bank_ready[r]) host_ready = 1'b1;
      if (host_rv[r]) begin
        host_rvalid = 1'b1;
        host_rdata  = bank_rdata[r];
      end
    end
  end

  assign cfg_busy = |ld_busy;

endmodule
