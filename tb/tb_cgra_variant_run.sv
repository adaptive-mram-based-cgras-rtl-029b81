// tb_cgra_variant_run: one run of the array top at a non-default bank shape,
// used by tb_cgra_variants.
//
// Parameters ROWS and COLS select the shape: ROWS = 1, COLS = 12 is a single
// bank with a 384-bit word serving all twelve pairs; ROWS = 12, COLS = 1 is
// twelve banks with 32-bit words, one per pair. READ_PS and WRITE_PS are the
// MRAM access times of that bank shape. The memories are made small (1K-word
// data and configuration memories, 4K-word banks) to keep the run short.
//
// The twelve PEs form one line along the long side of the array: west to east
// for a single row, north to south for a single column. PE p adds p+1 to every
// word. The switchbox schedule has one entry that moves VC 0 from the upstream
// neighbour into the PE and from the PE to the downstream neighbour. The run
// writes the configuration into every bank through the host port, reads one
// word back, reconfigures all banks, checks the configuration load time, then
// streams NS words through the line and checks each output (input + 78).
//
// Outputs: done goes high when the run is over; checks and failures are its
// counts.
module tb_cgra_variant_run #(
  parameter int unsigned ROWS     = 1,
  parameter int unsigned COLS     = 12,
  parameter int unsigned READ_PS  = 2740,
  parameter int unsigned WRITE_PS = 6730
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import cgra_pkg::*;
  localparam int unsigned BANK_DEPTH = 4096, CMEM = 1024, SCHED = 512;
  localparam int unsigned BW = COLS * 32, RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned READ_CYC = (READ_PS + 3999) / 4000;
  localparam int NS = 40, PLEN = 4;
  localparam bit HORIZ = (ROWS == 1);

  logic rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [RW-1:0] host_bank = '0;
  logic [11:0] host_addr = '0;
  logic [BW-1:0] host_wdata = '0, host_rdata;
  logic host_ready, host_rvalid;
  logic cfg_start = 0;
  logic [ROWS-1:0] cfg_bank_mask = '0;
  logic [11:0] cfg_base = '0;
  logic [10:0] cfg_pe_len = '0;
  logic [9:0] cfg_sb_len = '0;
  logic cfg_busy;
  logic [ROWS-1:0] cfg_done;
  flit_t [COLS-1:0] north_in, north_out, south_in, south_out;
  logic [COLS-1:0][3:0] north_in_ready, north_out_ready, south_in_ready, south_out_ready;
  flit_t [ROWS-1:0] west_in, west_out, east_in, east_out;
  logic [ROWS-1:0][3:0] west_in_ready, west_out_ready, east_in_ready, east_out_ready;
  logic [ROWS*COLS-1:0] pe_halted;

  cgra_top #(.ROWS(ROWS), .COLS(COLS), .DMEM_DEPTH(1024), .CMEM_DEPTH(CMEM), .SCHED_DEPTH(SCHED),
             .BANK_DEPTH(BANK_DEPTH), .READ_PS(READ_PS), .WRITE_PS(WRITE_PS)) dut (.*);

  int n_done = 0;
  always @(posedge clk) if (rst_n) n_done += $countones(cfg_done);

  function automatic logic [31:0] prog(int p, int i);
    case (i)
      0: return mk_li(DST_CNT, 2'd0, 16'(NS - 1));
      1: return mk_alu(OP_ADD, SRC_PORT, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'(p + 1));
      2: return mk_loop(15'd1);
      default: return mk_halt();
    endcase
  endfunction

  function automatic logic [31:0] sched();
    sched_entry_t e;
    e = '0;
    for (int o = 0; o < NUM_PORTS; o++) e.route[o] = mk_route(7, 1'b0, 2'd0);
    e.route[PORT_L] = mk_route(HORIZ ? PORT_W : PORT_N, 1'b0, 2'd0);
    e.route[HORIZ ? PORT_E : PORT_S] = mk_route(PORT_L, 1'b0, 2'd0);
    return e;
  endfunction

  function automatic logic [BW-1:0] bank_word(int r, int i);
    logic [BW-1:0] w;
    for (int c = 0; c < COLS; c++) w[32*c +: 32] = (i < PLEN) ? prog(HORIZ ? c : r, i) : sched();
    return w;
  endfunction

  task automatic host_write(int bank, int addr, logic [BW-1:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = RW'(bank); host_addr = 12'(addr); host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic host_read(int bank, int addr, output logic [BW-1:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_bank = RW'(bank); host_addr = 12'(addr);
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0;
    while (!host_rvalid) @(negedge clk);
    d = host_rdata;
  endtask

  logic [31:0] yq [$];
  always @(posedge clk)
    if (rst_n) begin
      if (HORIZ && east_out[0].valid) yq.push_back(east_out[0].data);
      if (!HORIZ && south_out[0].valid) yq.push_back(south_out[0].data);
    end

  initial begin
    logic [BW-1:0] d;
    logic [31:0] x [NS];
    int t0, cyc, sent, guard;
    flit_t pend;
    done = 0; checks = 0; failures = 0;
    north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    north_out_ready = '1; south_out_ready = '1; west_out_ready = '1; east_out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(ROWS); r++)
      for (int i = 0; i <= PLEN; i++) host_write(r, i, bank_word(r, i));
    host_read(ROWS - 1, PLEN, d);
    checks++;
    if (d !== bank_word(ROWS - 1, PLEN)) begin failures++; $display("FAIL %0dx%0d read-back", ROWS, COLS); end
    @(negedge clk);
    cfg_start = 1; cfg_bank_mask = '1; cfg_base = '0; cfg_pe_len = 11'(PLEN); cfg_sb_len = 10'd1;
    @(negedge clk);
    cfg_start = 0;
    cyc = 0;
    while (cfg_busy) begin @(negedge clk); cyc++; end
    // one bank word per (2 + READ_CYC) cycles, all banks in parallel
    checks += 2;
    if (cyc != (PLEN + 1) * (2 + int'(READ_CYC)) + 1) begin
      failures++; $display("FAIL %0dx%0d load took %0d cycles", ROWS, COLS, cyc);
    end
    @(negedge clk);
    if (n_done != int'(ROWS)) begin failures++; $display("FAIL %0dx%0d: %0d banks done", ROWS, COLS, n_done); end
    foreach (x[n]) x[n] = $urandom;
    sent = 0; pend = '0; guard = 0;
    while (yq.size() < NS && guard < 20000) begin
      @(negedge clk);
      if (HORIZ) west_in[0] = pend; else north_in[0] = pend;
      pend = '0;
      if (sent < NS && (HORIZ ? west_in_ready[0][0] : north_in_ready[0][0])) begin
        pend = '{valid: 1'b1, vc: 2'd0, data: x[sent]};
        sent++;
      end
      guard++;
    end
    west_in = '0; north_in = '0;
    checks++;
    if (yq.size() != NS) begin failures++; $display("FAIL %0dx%0d: %0d outputs", ROWS, COLS, yq.size()); end
    for (int n = 0; n < NS && n < yq.size(); n++) begin
      checks++;
      if (yq[n] !== x[n] + 32'd78) begin failures++; $display("FAIL %0dx%0d output %0d", ROWS, COLS, n); end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (pe_halted !== '1) begin failures++; $display("FAIL %0dx%0d PEs not halted", ROWS, COLS); end
    $display("%0dx%0d array, %0d-bit banks: %0d checks, %0d failures", ROWS, COLS, BW, checks, failures);
    done = 1;
  end
endmodule
