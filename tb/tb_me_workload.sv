// tb_me_workload: block-matching motion estimation on the full 12-PE array.
//
// A frame is cut into W x W windows. Window w goes to PE (w mod 12). For each
// of its windows a PE receives the W x W block of the current frame and the
// (W+2R) x (W+2R) search area of the previous frame around it (pixels outside
// the frame are 0). It stores both in data memory and computes the sum of
// squared differences for every displacement (dy, dx) in [-R, R]^2. It then
// reports the first displacement with the smallest sum, as two words:
//   {0, w*32 + k}                  k = (dy+R)*(2R+1) + (dx+R)
//   {1, w[3:0], ssd[26:0]}         the smallest sum
// The program is fully unrolled over displacements and over the pixels of a
// row (a loop runs over rows), so its length grows with W; the window size is
// changed by loading a different configuration.
//
// Network: each row is fed from its west edge. Words for column c travel on
// VC c. Switchbox (r,c) uses a 4-entry schedule. In entry e it routes W -> L
// when e == c and W -> E when e > c. Results travel west on VC 0: entries 0-1
// take the PE's result (L -> W), entries 2-3 take results from further east
// (E -> W).
//
// The test runs W = 14 on a 56 x 56 frame (16 windows), reconfigures, and runs
// W = 26 on a 52 x 52 frame (4 windows), with R = 2. These are the smallest
// and largest window sizes of the workload; the frames are scaled down from
// 1024 x 1024 to keep the simulation short. Every result is compared with a
// reference search computed here.
//
// The test also reads the access counters of the three MRAM bank models. It
// checks that a reconfiguration reads each configuration word exactly once. It
// prints an energy estimate from the 4 MB MRAM figures of the architecture's
// comparison table: 382.20 pJ per read of the three banks, and 11.61 mW of
// leakage over the run, taking one clock as 4 ns.
module tb_me_workload;
  import cgra_pkg::*;
  localparam int ROWS = 3, COLS = 4, NPE = 12, R = 2, NCAND = (2*R+1)*(2*R+1);
  localparam int REFB = 1024, BEST = 3000, BESTK = 3001;

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

  int checks = 0, failures = 0, n_reconfig = 0;
  always @(posedge clk) if (rst_n) n_reconfig += $countones(cfg_done);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- frames ---------------------------------------------------------------
  int F, W, S, NWX, NWIN;
  int prev [64][64];
  int cur  [64][64];

  function automatic int prev_px(int y, int x);
    return (y < 0 || x < 0 || y >= F || x >= F) ? 0 : prev[y][x];
  endfunction

  // ---- PE programs -------------------------------------------------------------
  logic [31:0] progs [NPE][$];

  task automatic emit(int j, logic [31:0] w);
    progs[j].push_back(w);
  endtask

  task automatic build_prog(int j, int c);
    int loop_at, k;
    progs[j].delete();
    for (int w = j; w < NWIN; w += NPE) begin
      // receive the current block and the search area
      emit(j, mk_li(DST_AR, 2'd0, 16'd0));
      emit(j, mk_li(DST_CNT, 2'd0, 16'(W * W - 1)));
      loop_at = progs[j].size();
      emit(j, mk_alu(OP_ADD, SRC_PORT, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'(c), 1'b1, 12'd0));
      emit(j, mk_loop(15'(loop_at)));
      emit(j, mk_li(DST_AR, 2'd0, 16'(REFB)));
      emit(j, mk_li(DST_CNT, 2'd0, 16'(S * S - 1)));
      loop_at = progs[j].size();
      emit(j, mk_alu(OP_ADD, SRC_PORT, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'(c), 1'b1, 12'd0));
      emit(j, mk_loop(15'(loop_at)));
      // best = 0xFFFFFFFF, best index = 0
      emit(j, mk_li(DST_REG, 2'd0, 16'd0));
      emit(j, mk_li(DST_AR, 2'd0, 16'(BEST)));
      emit(j, mk_alu(OP_SUB, SRC_REG, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd1));
      emit(j, mk_li(DST_AR, 2'd0, 16'(BESTK)));
      emit(j, mk_alu(OP_ADD, SRC_IMM, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
      // every displacement
      k = 0;
      for (int dy = -R; dy <= R; dy++) begin
        for (int dx = -R; dx <= R; dx++) begin
          emit(j, mk_li(DST_REG, 2'd0, 16'd0));
          emit(j, mk_li(DST_REG, 2'd1, 16'(REFB + (dy + R) * S + (dx + R))));
          emit(j, mk_li(DST_REG, 2'd2, 16'd0));
          emit(j, mk_li(DST_CNT, 2'd0, 16'(W - 1)));
          loop_at = progs[j].size();
          for (int x = 0; x < W; x++) begin
            emit(j, mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_AR, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'(x)));
            emit(j, mk_alu(OP_PASSA, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd3, 2'd0, 1'b0, 12'd0));
            emit(j, mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_AR, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'(x)));
            emit(j, mk_alu(OP_SUB, SRC_REG, SRC_DMEM, DST_REG, 2'd3, 2'd0, 2'd3, 2'd0, 1'b0, 12'd0));
            emit(j, mk_alu(OP_MUL, SRC_REG, SRC_REG, DST_REG, 2'd3, 2'd3, 2'd3, 2'd0, 1'b0, 12'd0));
            emit(j, mk_alu(OP_ADD, SRC_REG, SRC_REG, DST_REG, 2'd2, 2'd3, 2'd2, 2'd0, 1'b0, 12'd0));
          end
          emit(j, mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'(W)));
          emit(j, mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_REG, 2'd1, 2'd0, 2'd1, 2'd0, 1'b0, 12'(S)));
          emit(j, mk_loop(15'(loop_at)));
          // branch-free update: f = ssd <u best; best += f*(ssd-best); bestk += f*(k-bestk)
          emit(j, mk_li(DST_AR, 2'd0, 16'(BEST)));
          emit(j, mk_alu(OP_PASSA, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_SLTU, SRC_REG, SRC_REG, DST_REG, 2'd2, 2'd0, 2'd3, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_SUB, SRC_REG, SRC_REG, DST_REG, 2'd2, 2'd0, 2'd1, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_MUL, SRC_REG, SRC_REG, DST_REG, 2'd1, 2'd3, 2'd1, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_ADD, SRC_REG, SRC_REG, DST_DMEM, 2'd0, 2'd1, 2'd0, 2'd0, 1'b0, 12'd0));
          emit(j, mk_li(DST_AR, 2'd0, 16'(BESTK)));
          emit(j, mk_alu(OP_PASSA, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_SUB, SRC_IMM, SRC_REG, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b0, 12'(k)));
          emit(j, mk_alu(OP_MUL, SRC_REG, SRC_REG, DST_REG, 2'd1, 2'd3, 2'd1, 2'd0, 1'b0, 12'd0));
          emit(j, mk_alu(OP_ADD, SRC_REG, SRC_REG, DST_DMEM, 2'd0, 2'd1, 2'd0, 2'd0, 1'b0, 12'd0));
          k++;
        end
      end
      // report
      emit(j, mk_li(DST_AR, 2'd0, 16'(BESTK)));
      emit(j, mk_alu(OP_ADD, SRC_DMEM, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'(w * 32)));
      emit(j, mk_li(DST_AR, 2'd0, 16'(BEST)));
      emit(j, mk_li(DST_REG, 2'd0, 16'(32'h8000 | (w << 11))));
      emit(j, mk_alu(OP_SLL, SRC_REG, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd16));
      emit(j, mk_alu(OP_OR, SRC_REG, SRC_DMEM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
    end
    emit(j, mk_halt());
  endtask

  function automatic logic [31:0] sched(int c, int e);
    sched_entry_t s;
    s = '0;
    for (int o = 0; o < NUM_PORTS; o++) s.route[o] = mk_route(7, 1'b0, 2'd0);
    if (e == c) s.route[PORT_L] = mk_route(PORT_W, 1'b0, 2'(c));
    if (e > c)  s.route[PORT_E] = mk_route(PORT_W, 1'b0, 2'(e));
    s.route[PORT_W] = (e < 2) ? mk_route(PORT_L, 1'b0, 2'd0) : mk_route(PORT_E, 1'b0, 2'd0);
    return s;
  endfunction

  // ---- host and reconfiguration --------------------------------------------------
  task automatic host_write(int bank, int addr, logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = 2'(bank); host_addr = 18'(addr); host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  // Accesses to all three banks, and the 4 MB MRAM figures of the
  // architecture's comparison table (per access of all three banks together,
  // and leakage of all three).
  localparam real READ_PJ = 382.20, WRITE_PJ = 317.13, LEAK_MW = 11.61;
  function automatic longint bank_reads();
    return longint'(dut.g_row[0].u_bank.n_reads + dut.g_row[1].u_bank.n_reads + dut.g_row[2].u_bank.n_reads);
  endfunction
  function automatic longint bank_writes();
    return longint'(dut.g_row[0].u_bank.n_writes + dut.g_row[1].u_bank.n_writes + dut.g_row[2].u_bank.n_writes);
  endfunction

  task automatic configure(int base);
    int len;
    longint rd0, wr0, t_load, n_words;
    logic [127:0] word;
    len = 0;
    for (int j = 0; j < NPE; j++) begin
      build_prog(j, j % COLS);
      if (progs[j].size() > len) len = progs[j].size();
    end
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < len + COLS; i++) begin
        for (int c = 0; c < COLS; c++) begin
          int j;
          j = r * COLS + c;
          if (i < len) word[32*c +: 32] = (i < progs[j].size()) ? progs[j][i] : mk_halt();
          else         word[32*c +: 32] = sched(c, i - len);
        end
        host_write(r, base + i, word);
      end
    n_words = 3 * longint'(len) + 3 * longint'(COLS);
    checks++;
    wr0 = bank_writes();
    if (wr0 < n_words) begin failures++; $display("FAIL %0d bank writes counted", wr0); end
    rd0 = bank_reads();
    t_load = $time;
    @(negedge clk);
    cfg_start = 1; cfg_bank_mask = 3'b111; cfg_base = 18'(base);
    cfg_pe_len = 16'(len); cfg_sb_len = 10'(COLS);
    @(negedge clk);
    cfg_start = 0;
    while (cfg_busy) @(negedge clk);
    $display("W=%0d: %0d program words per PE, array loaded in %0d cycles", W, len, ($time - t_load) / 4);
    // every bank reads each configuration word exactly once
    checks++;
    if (bank_reads() - rd0 != n_words) begin
      failures++; $display("FAIL %0d bank reads for one reconfiguration, expected %0d", bank_reads() - rd0, n_words);
    end
    $display("W=%0d: MRAM read energy of this reconfiguration %0.1f nJ", W,
             real'(bank_reads() - rd0) / 3.0 * READ_PJ / 1000.0);
  endtask

  // ---- results -------------------------------------------------------------------
  int got_k [64], got_ssd [64];
  bit got_k_v [64], got_ssd_v [64];
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < ROWS; r++) if (west_out[r].valid) begin
      logic [31:0] d;
      d = west_out[r].data;
      if (d[31]) begin got_ssd[int'(d[30:27])] = int'(d[26:0]); got_ssd_v[int'(d[30:27])] = 1'b1; end
      else       begin got_k[int'(d[10:5])] = int'(d[4:0]);     got_k_v[int'(d[10:5])] = 1'b1; end
    end
  end

  task automatic run_me(int win, int frame, int base);
    int q [ROWS][COLS][$];
    int rr [ROWS];
    flit_t [ROWS-1:0] pend;
    longint t0;
    int guard;
    bit busy;
    W = win; F = frame; S = W + 2 * R; NWX = F / W; NWIN = NWX * NWX;
    // previous frame random; current frame = previous shifted per window
    for (int y = 0; y < F; y++) for (int x = 0; x < F; x++) prev[y][x] = $urandom_range(0, 255);
    for (int w = 0; w < NWIN; w++) begin
      int my, mx, oy, ox;
      my = $urandom_range(0, 2 * R) - R; mx = $urandom_range(0, 2 * R) - R;
      oy = (w / NWX) * W; ox = (w % NWX) * W;
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++)
        cur[oy + y][ox + x] = (prev_px(oy + y + my, ox + x + mx) + $urandom_range(0, 3)) % 256;
    end
    configure(base);
    t0 = $time;
    foreach (got_k_v[i]) begin got_k_v[i] = 0; got_ssd_v[i] = 0; end
    // data streams, one per PE, in window order
    for (int w = 0; w < NWIN; w++) begin
      int j, oy, ox;
      j = w % NPE; oy = (w / NWX) * W; ox = (w % NWX) * W;
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) q[j / COLS][j % COLS].push_back(cur[oy + y][ox + x]);
      for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) q[j / COLS][j % COLS].push_back(prev_px(oy - R + y, ox - R + x));
    end
    pend = '0;
    for (int r = 0; r < ROWS; r++) rr[r] = 0;
    guard = 0;
    do begin
      @(negedge clk);
      west_in = pend;
      pend = '0;
      busy = 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        for (int n = 0; n < COLS; n++) begin
          int c;
          c = (rr[r] + n) % COLS;
          if (q[r][c].size() != 0 && west_in_ready[r][c]) begin
            pend[r] = '{valid: 1'b1, vc: 2'(c), data: 32'(q[r][c].pop_front())};
            rr[r] = c + 1;
            break;
          end
        end
        for (int c = 0; c < COLS; c++) if (q[r][c].size() != 0) busy = 1'b1;
      end
      guard++;
    end while ((busy || pend != '0 || pe_halted != '1) && guard < 2000000);
    west_in = '0;
    repeat (50) @(negedge clk);
    $display("W=%0d: %0d windows in %0d cycles; MRAM leakage over the run %0.1f nJ", W, NWIN, ($time - t0) / 4,
             LEAK_MW * real'($time - t0) / 1000.0);
    for (int w = 0; w < NWIN; w++) begin
      int oy, ox, best, bestk, k;
      oy = (w / NWX) * W; ox = (w % NWX) * W;
      best = -1; bestk = 0; k = 0;
      for (int dy = -R; dy <= R; dy++) for (int dx = -R; dx <= R; dx++) begin
        int ssd;
        ssd = 0;
        for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
          int d;
          d = cur[oy + y][ox + x] - prev_px(oy + y + dy, ox + x + dx);
          ssd += d * d;
        end
        if (unsigned'(ssd) < unsigned'(best)) begin best = ssd; bestk = k; end
        k++;
      end
      checks += 2;
      if (!got_k_v[w] || got_k[w] != bestk) begin
        failures++; $display("FAIL W=%0d window %0d: vector %0d, expected %0d", W, w, got_k[w], bestk);
      end
      if (!got_ssd_v[w] || got_ssd[w] != best) begin
        failures++; $display("FAIL W=%0d window %0d: ssd %0d, expected %0d", W, w, got_ssd[w], best);
      end
    end
  endtask

  initial begin
    north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    north_out_ready = '1; south_out_ready = '1; west_out_ready = '1; east_out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_me(14, 56, 0);
    run_me(26, 52, 'h10000);
    checks++;
    if (n_reconfig != 6) begin failures++; $display("FAIL %0d bank loads, expected 6", n_reconfig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
