// tb_cgra_top: end-to-end test of the whole CGRA at its default size
// (3 x 4 PE/switchbox pairs, three 256K x 128 MRAM banks).
//
// Two configurations are written into every bank through the host port and
// read back:
//   A: every row is a 4-stage pipeline. Switchbox (r,c) routes W -> L and
//      L -> E on VC 0 with a one-entry schedule; PE (r,c) computes
//      y = x * a[c] + b[c] for NWORDS words, then halts.
//   B: PE (r,c) computes y = (x ^ m[c]) - d[c]; the schedule has two entries
//      that alternate neighbour routes and buffer-only routes.
// Phase 1 loads A into all banks and streams NWORDS words through each row
// from the west edge to the east edge. Phase 2 reloads only row 1 with B
// (bank mask 010) and streams again through row 1. Phase 3 switches all rows
// back to A. The east-edge sink drops ready at random so that transfers are
// blocked and PEs stall. Outputs are compared with values computed here.
//
// Mechanisms counted (each must occur): reconfigurations, cycles held during
// loading, neighbour (direct) transfers, buffered transfers, transfers blocked
// by ready, PE stall cycles, PE halts, host reads and writes of the MRAM.
module tb_cgra_top;
  import cgra_pkg::*;
  localparam int ROWS = 3, COLS = 4, NWORDS = 24;

  logic clk = 0, rst_n = 0;
  logic host_req = 0, host_we = 0;
  logic [1:0] host_bank = '0;
  logic [17:0] host_addr = '0;
  logic [127:0] host_wdata = '0, host_rdata;
  logic host_ready, host_rvalid;
  logic cfg_start = 0;
  logic [2:0] cfg_bank_mask = '0;
  logic [17:0] cfg_base = '0;
  logic [15:0] cfg_pe_len = '0;
  logic [9:0] cfg_sb_len = '0;
  logic cfg_busy;
  logic [2:0] cfg_done;
  flit_t [COLS-1:0] north_in, north_out, south_in, south_out;
  logic [COLS-1:0][3:0] north_in_ready, north_out_ready, south_in_ready, south_out_ready;
  flit_t [ROWS-1:0] west_in, west_out, east_in, east_out;
  logic [ROWS-1:0][3:0] west_in_ready, west_out_ready, east_in_ready, east_out_ready;
  logic [ROWS*COLS-1:0] pe_halted;

  cgra_top dut (.*);
  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reconfig = 0, n_hold = 0, n_direct = 0, n_buf = 0, n_blocked = 0;
  int n_stall = 0, n_halt = 0, n_host_wr = 0, n_host_rd = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters -------------------------------------------------
  int stall_c [ROWS*COLS], halt_c [ROWS*COLS], dir_c [ROWS*COLS], buf_c [ROWS*COLS], blk_c [ROWS*COLS];
  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      logic was_halted = 1'b1;
      always @(posedge clk) if (rst_n) begin
        if (!dut.g_row[r].g_col[c].u_pe.halted && !dut.g_row[r].g_col[c].u_pe.hold &&
            !dut.g_row[r].g_col[c].u_pe.fetch && !dut.g_row[r].g_col[c].u_pe.fire)
          stall_c[r*COLS+c]++;
        if (dut.g_row[r].g_col[c].u_pe.halted && !was_halted) halt_c[r*COLS+c]++;
        was_halted <= dut.g_row[r].g_col[c].u_pe.halted;
        dir_c[r*COLS+c] += $countones(dut.g_row[r].g_col[c].u_sb.ev_direct);
        buf_c[r*COLS+c] += $countones(dut.g_row[r].g_col[c].u_sb.ev_buffered);
        blk_c[r*COLS+c] += $countones(dut.g_row[r].g_col[c].u_sb.ev_blocked);
      end
    end
  end
  always @(posedge clk) if (rst_n) begin
    n_reconfig += $countones(cfg_done);
    if (cfg_busy) n_hold++;
  end

  // ---- configurations --------------------------------------------------------
  localparam int BASE_A = 'h00100, BASE_B = 'h20000;
  localparam int PE_LEN = 5;
  int unsigned ka [COLS] = '{3, 5, 7, 11};
  int unsigned kb [COLS] = '{1, 100, 12, 9};
  int unsigned km [COLS] = '{32'h0000_00FF, 32'h0F0F_0000, 32'h1234_5678, 32'h8000_0001};
  int unsigned kd [COLS] = '{17, 2, 300, 65};

  function automatic logic [31:0] prog_word(bit cfg_b, int c, int i);
    case (i)
      0: return mk_li(DST_CNT, 2'd0, 16'(NWORDS - 1));
      1: return cfg_b ? mk_alu(OP_XOR, SRC_PORT, SRC_REG, DST_REG, 2'd0, 2'd2, 2'd1, 2'd0, 1'b0, 12'd0)
                      : mk_alu(OP_MUL, SRC_PORT, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b0, 12'(ka[c]));
      2: return cfg_b ? mk_alu(OP_SUB, SRC_REG, SRC_IMM, DST_PORT, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'(kd[c]))
                      : mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_PORT, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'(kb[c]));
      3: return mk_loop(15'd1);
      default: return mk_halt();
    endcase
  endfunction

  // Configuration B first builds m[c] in r2 from its two 16-bit halves
  // (LI, LI, shift, or), then runs the same loop shape as A.
  function automatic logic [31:0] prog_b(int c, int i);
    case (i)
      0: return mk_li(DST_REG, 2'd2, km[c][31:16]);
      1: return mk_li(DST_REG, 2'd3, km[c][15:0]);
      2: return mk_alu(OP_SLL, SRC_REG, SRC_IMM, DST_REG, 2'd2, 2'd0, 2'd2, 2'd0, 1'b0, 12'd16);
      3: return mk_alu(OP_OR, SRC_REG, SRC_REG, DST_REG, 2'd2, 2'd3, 2'd2, 2'd0, 1'b0, 12'd0);
      4: return mk_li(DST_CNT, 2'd0, 16'(NWORDS - 1));
      5: return prog_word(1'b1, c, 1);
      6: return prog_word(1'b1, c, 2);
      7: return mk_loop(15'd5);
      default: return mk_halt();
    endcase
  endfunction
  localparam int PE_LEN_B = 9;

  function automatic logic [31:0] sched_word(bit cfg_b, int i);
    sched_entry_t e;
    e = '0;
    for (int o = 0; o < NUM_PORTS; o++) e.route[o] = mk_route(7, 1'b0, 2'd0);
    if (!cfg_b || i == 0) begin
      e.route[PORT_L] = mk_route(PORT_W, 1'b0, 2'd0);
      e.route[PORT_E] = mk_route(PORT_L, cfg_b, 2'd0);
    end else begin
      e.route[PORT_L] = mk_route(PORT_W, 1'b1, 2'd0);
      e.route[PORT_E] = mk_route(PORT_L, 1'b0, 2'd0);
    end
    return e;
  endfunction

  function automatic logic [127:0] bank_word(bit cfg_b, int i);
    logic [127:0] w;
    for (int c = 0; c < COLS; c++) begin
      if (!cfg_b) w[32*c +: 32] = (i < PE_LEN) ? prog_word(1'b0, c, i) : sched_word(1'b0, i - PE_LEN);
      else        w[32*c +: 32] = (i < PE_LEN_B) ? prog_b(c, i) : sched_word(1'b1, i - PE_LEN_B);
    end
    return w;
  endfunction

  function automatic logic [31:0] expect_row(bit cfg_b, logic [31:0] x);
    logic [31:0] y;
    y = x;
    for (int c = 0; c < COLS; c++) y = cfg_b ? ((y ^ km[c]) - kd[c]) : (y * ka[c] + kb[c]);
    return y;
  endfunction

  // ---- host port ---------------------------------------------------------------
  task automatic host_write(int bank, int addr, logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = 2'(bank); host_addr = 18'(addr); host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
    n_host_wr++;
  endtask

  task automatic host_read(int bank, int addr, output logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_bank = 2'(bank); host_addr = 18'(addr);
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0;
    while (!host_rvalid) @(negedge clk);
    d = host_rdata;
    n_host_rd++;
  endtask

  // ---- stream source (west edge) and sink (east edge) -------------------------
  logic [31:0] xin [ROWS][NWORDS];
  logic [31:0] yout [ROWS][$];
  bit sink_random = 1'b0;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < ROWS; r++) if (east_out[r].valid) yout[r].push_back(east_out[r].data);
  end

  task automatic stream(logic [ROWS-1:0] rows, bit cfg_b);
    int sent [ROWS];
    flit_t [ROWS-1:0] pend;
    int guard;
    pend = '0;
    for (int r = 0; r < ROWS; r++) begin
      sent[r] = 0;
      yout[r].delete();
      for (int i = 0; i < NWORDS; i++) xin[r][i] = $urandom;
    end
    guard = 0;
    while (guard < 20000) begin
      bit all_done;
      @(negedge clk);
      west_in = pend;
      pend = '0;
      for (int r = 0; r < ROWS; r++)
        if (rows[r] && sent[r] < NWORDS && west_in_ready[r][0] && $urandom_range(0, 1) == 0) begin
          pend[r] = '{valid: 1'b1, vc: 2'd0, data: xin[r][sent[r]]};
          sent[r]++;
        end
      for (int r = 0; r < ROWS; r++) east_out_ready[r] = sink_random ? 4'($urandom) : 4'hF;
      all_done = 1'b1;
      for (int r = 0; r < ROWS; r++) if (rows[r] && yout[r].size() < NWORDS) all_done = 1'b0;
      if (all_done) break;
      guard++;
    end
    west_in = '0;
    for (int r = 0; r < ROWS; r++) if (rows[r]) begin
      checks++;
      if (yout[r].size() != NWORDS) begin
        failures++; $display("FAIL row %0d got %0d of %0d words", r, yout[r].size(), NWORDS);
      end
      for (int i = 0; i < yout[r].size() && i < NWORDS; i++) begin
        checks++;
        if (yout[r][i] !== expect_row(cfg_b, xin[r][i])) begin
          failures++;
          $display("FAIL row %0d word %0d got %h exp %h", r, i, yout[r][i], expect_row(cfg_b, xin[r][i]));
        end
      end
    end
    // the row programs end with HALT
    repeat (20) @(negedge clk);
    for (int r = 0; r < ROWS; r++) if (rows[r]) begin
      checks++;
      if (pe_halted[r*COLS +: COLS] !== 4'hF) begin failures++; $display("FAIL row %0d not halted", r); end
    end
  endtask

  task automatic reconfigure(logic [2:0] mask, int base, int pl, int sl);
    int busy_cycles;
    @(negedge clk);
    cfg_start = 1; cfg_bank_mask = mask; cfg_base = 18'(base); cfg_pe_len = 16'(pl); cfg_sb_len = 10'(sl);
    @(negedge clk);
    cfg_start = 0;
    busy_cycles = 0;
    while (cfg_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    // one 128-bit bank read (1 cycle at 4 ns) plus request and write per word
    if (busy_cycles != (pl + sl) * 3 + 1) begin
      failures++; $display("FAIL reconfiguration took %0d cycles, expected %0d", busy_cycles, (pl + sl) * 3 + 1);
    end
  endtask

  initial begin
    logic [127:0] d;
    north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    north_out_ready = '1; south_out_ready = '1; west_out_ready = '1; east_out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pe_halted !== '1) begin failures++; $display("FAIL PEs not idle after reset"); end

    // write both configurations into every bank, read a few words back
    for (int b = 0; b < ROWS; b++) begin
      for (int i = 0; i < PE_LEN + 1; i++)   host_write(b, BASE_A + i, bank_word(1'b0, i));
      for (int i = 0; i < PE_LEN_B + 2; i++) host_write(b, BASE_B + i, bank_word(1'b1, i));
    end
    for (int b = 0; b < ROWS; b++) begin
      host_read(b, BASE_A + 1, d);
      checks++; if (d !== bank_word(1'b0, 1)) begin failures++; $display("FAIL host read bank %0d", b); end
      host_read(b, BASE_B + PE_LEN_B, d);
      checks++; if (d !== bank_word(1'b1, PE_LEN_B)) begin failures++; $display("FAIL host read B bank %0d", b); end
    end

    // phase 1: configuration A on all rows
    reconfigure(3'b111, BASE_A, PE_LEN, 1);
    sink_random = 1'b1;
    stream(3'b111, 1'b0);
    $display("phase 1 done at %0t", $time);

    // phase 2: only row 1 switches to configuration B
    reconfigure(3'b010, BASE_B, PE_LEN_B, 2);
    stream(3'b010, 1'b1);
    $display("phase 2 done at %0t", $time);

    // phase 3: all rows back to A
    reconfigure(3'b111, BASE_A, PE_LEN, 1);
    stream(3'b111, 1'b0);

    for (int i = 0; i < ROWS * COLS; i++) begin
      n_stall += stall_c[i]; n_halt += halt_c[i];
      n_direct += dir_c[i]; n_buf += buf_c[i]; n_blocked += blk_c[i];
    end
    $display("reconfigurations=%0d held_cycles=%0d direct=%0d buffered=%0d blocked=%0d pe_stalls=%0d halts=%0d host_wr=%0d host_rd=%0d",
             n_reconfig, n_hold, n_direct, n_buf, n_blocked, n_stall, n_halt, n_host_wr, n_host_rd);
    checks += 9;
    if (n_reconfig != 7) begin failures++; $display("FAIL reconfigurations %0d, expected 7 bank loads", n_reconfig); end
    if (n_hold == 0)     begin failures++; $display("FAIL never held"); end
    if (n_direct == 0)   begin failures++; $display("FAIL no direct transfer"); end
    if (n_buf == 0)      begin failures++; $display("FAIL no buffered transfer"); end
    if (n_blocked == 0)  begin failures++; $display("FAIL no blocked transfer"); end
    if (n_stall == 0)    begin failures++; $display("FAIL no PE stall"); end
    if (n_halt != 28)    begin failures++; $display("FAIL halts %0d, expected 28", n_halt); end
    if (n_host_wr == 0)  begin failures++; $display("FAIL no host write"); end
    if (n_host_rd == 0)  begin failures++; $display("FAIL no host read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
