// tb_fir_workload: the adaptive FIR workload on the full 12-PE array.
//
// An FIR filter of T taps is spread evenly over the 12 PEs (K = T/12 taps
// each). The PEs form a chain that snakes through the array: row 0 west to
// east, row 1 east to west, row 2 west to east. Each PE keeps its K most recent
// input samples in its data memory and its K coefficients as immediates in its
// program. For every sample it takes the sample (VC 0) and the upstream
// partial sum (VC 1, zero for the first PE), adds its K products, and passes
// on the sample that leaves its delay line (VC 0) and the new partial sum
// (VC 1). The last PE's partial sum, leaving on the east edge of row 2, is
// the filter output y[n] = sum_t h[t] * x[n-t].
//
// Each switchbox uses a two-entry schedule: entry v moves VC v from the
// upstream neighbour into the PE and from the PE to the downstream neighbour.
// Samples are 8-bit signed values and coefficients lie in -100..100.
//
// The test runs 120 taps, reconfigures the array to 1920 taps, then back to
// 120 taps (the smallest and largest tap counts of the workload), comparing
// every output with a reference convolution and checking the cycles per
// sample (2*(5K+6) per PE program pass, within 10% including pipeline fill).
module tb_fir_workload;
  import cgra_pkg::*;
  localparam int ROWS = 3, COLS = 4, NPE = 12;

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
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- chain order ------------------------------------------------------------
  function automatic int chain_pos(int r, int c);
    return (r == 1) ? 4 + (COLS - 1 - c) : r * COLS + c;
  endfunction

  // ---- PE program for chain position j ---------------------------------------
  int h [1920];
  localparam int MAIN = 5;

  function automatic int prog_len(int k);
    return 5 * k + 12;
  endfunction

  function automatic logic [31:0] prog(int j, int k, int ns, int i);
    int t, p;
    if (i == 0) return mk_li(DST_AR, 2'd0, 16'd0);
    if (i == 1) return mk_li(DST_CNT, 2'd0, 16'(k - 1));
    if (i == 2) return mk_alu(OP_ADD, SRC_IMM, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b1, 12'd0);
    if (i == 3) return mk_loop(15'd2);
    if (i == 4) return mk_li(DST_CNT, 2'd0, 16'(ns - 1));
    if (i == MAIN)     return mk_li(DST_AR, 2'd0, 16'd0);
    if (i == MAIN + 1) return mk_alu(OP_PASSA, SRC_PORT, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0);
    if (i == MAIN + 2) return (j == 0) ? mk_li(DST_REG, 2'd3, 16'd0)
                              : mk_alu(OP_PASSA, SRC_PORT, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd3, 2'd1, 1'b0, 12'd0);
    t = i - (MAIN + 3);
    if (t < 5 * k) begin
      p = t % 5;
      case (p)
        0: return mk_alu(OP_MUL, SRC_REG, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd2, 2'd0, 1'b0, 12'(h[j * k + t / 5]));
        1: return mk_alu(OP_ADD, SRC_REG, SRC_REG, DST_REG, 2'd3, 2'd2, 2'd3, 2'd0, 1'b0, 12'd0);
        2: return mk_alu(OP_PASSA, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b0, 12'd0);
        3: return mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b1, 12'd0);
        default: return mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_REG, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0);
      endcase
    end
    t -= 5 * k;
    if (t == 0) return mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0);
    if (t == 1) return mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_PORT, 2'd3, 2'd0, 2'd0, 2'd1, 1'b0, 12'd0);
    if (t == 2) return mk_loop(15'(MAIN));
    return mk_halt();
  endfunction

  // ---- switchbox schedule for (r,c), entry v -----------------------------------
  function automatic logic [31:0] sched(int r, int c, int v);
    sched_entry_t e;
    int in_p, out_p;
    e = '0;
    for (int o = 0; o < NUM_PORTS; o++) e.route[o] = mk_route(7, 1'b0, 2'd0);
    if (r == 0)      begin in_p = PORT_W;                         out_p = (c < COLS-1) ? PORT_E : PORT_S; end
    else if (r == 1) begin in_p = (c == COLS-1) ? PORT_N : PORT_E; out_p = (c > 0) ? PORT_W : PORT_S;      end
    else             begin in_p = (c == 0) ? PORT_N : PORT_W;      out_p = PORT_E;                         end
    e.route[PORT_L] = mk_route(in_p, 1'b0, 2'(v));
    e.route[out_p]  = mk_route(PORT_L, 1'b0, 2'(v));
    return e;
  endfunction

  // ---- host and reconfiguration -------------------------------------------------
  task automatic host_write(int bank, int addr, logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = 2'(bank); host_addr = 18'(addr); host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic store_config(int base, int k, int ns);
    int len;
    logic [127:0] w;
    len = prog_len(k);
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < len + 2; i++) begin
        for (int c = 0; c < COLS; c++)
          w[32*c +: 32] = (i < len) ? prog(chain_pos(r, c), k, ns, i) : sched(r, c, i - len);
        host_write(r, base + i, w);
      end
  endtask

  task automatic reconfigure(int base, int k);
    @(negedge clk);
    cfg_start = 1; cfg_bank_mask = 3'b111; cfg_base = 18'(base);
    cfg_pe_len = 16'(prog_len(k)); cfg_sb_len = 10'd2;
    @(negedge clk);
    cfg_start = 0;
    while (cfg_busy) @(negedge clk);
  endtask

  // ---- run one filter ----------------------------------------------------------------
  logic [31:0] yq [$];
  always @(posedge clk) if (rst_n && east_out[2].valid && east_out[2].vc == 2'd1) yq.push_back(east_out[2].data);

  task automatic run_fir(int taps, int ns, int base);
    int k, sent, guard;
    longint t0;
    int x [];
    flit_t pend;
    k = taps / NPE;
    for (int t = 0; t < taps; t++) h[t] = $urandom_range(0, 200) - 100;
    store_config(base, k, ns);
    reconfigure(base, k);
    t0 = $time;
    x = new[ns];
    for (int n = 0; n < ns; n++) x[n] = $urandom_range(0, 255) - 128;
    yq.delete();
    sent = 0; pend = '0; guard = 0;
    while (yq.size() < ns && guard < 4000000) begin
      @(negedge clk);
      west_in[0] = pend;
      pend = '0;
      if (sent < ns && west_in_ready[0][0]) begin
        pend = '{valid: 1'b1, vc: 2'd0, data: 32'(x[sent])};
        sent++;
      end
      guard++;
    end
    west_in = '0;
    checks++;
    if (yq.size() != ns) begin failures++; $display("FAIL %0d taps: %0d of %0d outputs", taps, yq.size(), ns); end
    for (int n = 0; n < yq.size() && n < ns; n++) begin
      int acc;
      acc = 0;
      for (int t = 0; t < taps && t <= n; t++) acc += h[t] * x[n - t];
      checks++;
      if (yq[n] !== 32'(acc)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d taps y[%0d] = %0d, expected %0d", taps, n, $signed(yq[n]), acc);
      end
    end
    $display("%0d taps: %0d samples, %0d cycles per sample (expected %0d)", taps, ns,
             ($time - t0) / 4 / longint'(ns), 2 * (5 * k + 6));
    // throughput: one sample per 2*(5K+6) cycles once the chain is full
    checks++;
    if (($time - t0) / 4 > longint'(ns * 2 * (5 * k + 6) * 11 / 10)) begin
      failures++; $display("FAIL %0d taps slower than expected", taps);
    end
    repeat (50) @(negedge clk);
    checks++;
    if (pe_halted !== '1) begin failures++; $display("FAIL PEs not halted after %0d taps", taps); end
  endtask

  initial begin
    north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    north_out_ready = '1; south_out_ready = '1; west_out_ready = '1; east_out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_fir(120, 300, 0);
    run_fir(1920, 2000, 'h1000);
    run_fir(120, 150, 0);
    checks++;
    if (n_reconfig != 9) begin failures++; $display("FAIL %0d bank loads, expected 9", n_reconfig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
