// tb_rs_workload: the syndrome stage of Reed-Solomon RS(255,k) decoding on
// the full 12-PE array.
//
// The syndromes of a received word r(x) = sum r_j x^j over GF(2^8) (field
// polynomial x^8+x^4+x^3+x^2+1) are S_i = r(alpha^i), i = 1..2t, 2t = 255-k.
// Syndrome i is computed by chain position (i-1) mod 12, using Horner's rule
// as symbols arrive highest degree first: S <- S*alpha^i xor r_j. There is no
// field multiplier in the PE, so each PE keeps a 256-entry table of
// x*alpha^i for each of its syndromes in data memory. The program writes the
// tables itself from immediates, so they come with the configuration.
//
// The PEs form the same snake-shaped chain as the FIR test. Symbols enter at
// the west edge of row 0 on VC 0, and each PE passes them on. After a codeword
// each PE passes on the syndrome words of the PEs before it on VC 1, then adds
// its own. A syndrome word is (i << 8) | S_i. The words leave at the east edge
// of row 2 in chain order.
//
// The test encodes random messages systematically with the generator
// polynomial prod (x - alpha^i), i = 1..2t. Some codewords are sent clean (all
// syndromes must be zero); the others get up to t symbol errors. It runs
// RS(255,239), reconfigures to RS(255,217) (the weakest and the strongest
// codes of the workload), and checks every syndrome against a reference
// computation.
// Error location and correction (the later decoder stages) are not mapped.
module tb_rs_workload;
  import cgra_pkg::*;
  localparam int ROWS = 3, COLS = 4, NPE = 12, N = 255;
  localparam int SYN = 0, TAB = 1024;

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

  // ---- GF(2^8) ------------------------------------------------------------------
  int gexp [512];
  int glog [256];

  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x; gexp[i + 255] = x; glog[x] = i;
      x <<= 1;
      if ((x & 256) != 0) x ^= 'h11D;
    end
    gexp[510] = gexp[0]; gexp[511] = gexp[1];
    glog[0] = 0;
  end

  // ---- chain order and schedules (as in the FIR test) ----------------------------
  function automatic int chain_pos(int r, int c);
    return (r == 1) ? 4 + (COLS - 1 - c) : r * COLS + c;
  endfunction

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

  // ---- PE programs ------------------------------------------------------------------
  int TWO_T;
  logic [31:0] progs [NPE][$];

  task automatic emit(int j, logic [31:0] w);
    progs[j].push_back(w);
  endtask

  task automatic build_prog(int j, int ncw);
    int mine [$];
    int up, top, loop_at;
    progs[j].delete();
    for (int i = 1; i <= TWO_T; i++) if ((i - 1) % NPE == j) mine.push_back(i);
    up = 0;
    for (int i = 1; i <= TWO_T; i++) if ((i - 1) % NPE < j) up++;
    emit(j, mk_li(DST_REG, 2'd3, 16'(ncw)));
    // multiplication tables, one per syndrome
    emit(j, mk_li(DST_AR, 2'd0, 16'(TAB)));
    foreach (mine[l])
      for (int x = 0; x < 256; x++) begin
        int v;
        v = gmul(x, gexp[mine[l]]);
        emit(j, mk_alu(OP_OR, SRC_IMM, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b1, 12'(v)));
      end
    top = progs[j].size();
    emit(j, mk_li(DST_AR, 2'd0, 16'(SYN)));
    foreach (mine[l]) emit(j, mk_alu(OP_OR, SRC_IMM, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd0, 1'b1, 12'd0));
    emit(j, mk_li(DST_CNT, 2'd0, 16'(N - 1)));
    loop_at = progs[j].size();
    emit(j, mk_alu(OP_PASSA, SRC_PORT, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
    emit(j, mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
    foreach (mine[l]) begin
      emit(j, mk_li(DST_AR, 2'd0, 16'(SYN + l)));
      emit(j, mk_alu(OP_PASSA, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b0, 12'd0));
      emit(j, mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_AR, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'(TAB + 256 * l)));
      emit(j, mk_alu(OP_XOR, SRC_DMEM, SRC_REG, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b0, 12'd0));
      emit(j, mk_li(DST_AR, 2'd0, 16'(SYN + l)));
      emit(j, mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_DMEM, 2'd1, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
    end
    emit(j, mk_loop(15'(loop_at)));
    // pass on the syndromes of earlier chain positions, then add our own
    if (up > 0) begin
      emit(j, mk_li(DST_CNT, 2'd0, 16'(up - 1)));
      loop_at = progs[j].size();
      emit(j, mk_alu(OP_PASSA, SRC_PORT, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd1, 1'b0, 12'd0));
      emit(j, mk_loop(15'(loop_at)));
    end
    foreach (mine[l]) begin
      emit(j, mk_li(DST_AR, 2'd0, 16'(SYN + l)));
      emit(j, mk_li(DST_REG, 2'd2, 16'(mine[l] << 8)));
      emit(j, mk_alu(OP_OR, SRC_DMEM, SRC_REG, DST_PORT, 2'd0, 2'd2, 2'd0, 2'd1, 1'b0, 12'd0));
    end
    // next codeword
    emit(j, mk_alu(OP_SUB, SRC_REG, SRC_IMM, DST_REG, 2'd3, 2'd0, 2'd3, 2'd0, 1'b0, 12'd1));
    emit(j, mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_CNT, 2'd3, 2'd0, 2'd0, 2'd0, 1'b0, 12'd0));
    emit(j, mk_loop(15'(top)));
    emit(j, mk_halt());
  endtask

  // ---- host and reconfiguration -------------------------------------------------
  task automatic host_write(int bank, int addr, logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 1; host_bank = 2'(bank); host_addr = 18'(addr); host_wdata = d;
    while (!host_ready) @(negedge clk);
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic configure(int base, int ncw);
    int len;
    logic [127:0] word;
    len = 0;
    for (int j = 0; j < NPE; j++) begin
      build_prog(j, ncw);
      if (progs[j].size() > len) len = progs[j].size();
    end
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < len + 2; i++) begin
        for (int c = 0; c < COLS; c++) begin
          int j;
          j = chain_pos(r, c);
          if (i < len) word[32*c +: 32] = (i < progs[j].size()) ? progs[j][i] : mk_halt();
          else         word[32*c +: 32] = sched(r, c, i - len);
        end
        host_write(r, base + i, word);
      end
    @(negedge clk);
    cfg_start = 1; cfg_bank_mask = 3'b111; cfg_base = 18'(base);
    cfg_pe_len = 16'(len); cfg_sb_len = 10'd2;
    @(negedge clk);
    cfg_start = 0;
    while (cfg_busy) @(negedge clk);
    $display("RS(255,%0d): %0d program words per PE", N - TWO_T, len);
  endtask

  // ---- run ------------------------------------------------------------------------
  logic [31:0] sq [$];
  always @(posedge clk) if (rst_n && east_out[2].valid && east_out[2].vc == 2'd1) sq.push_back(east_out[2].data);

  task automatic run_rs(int k, int ncw, int base);
    int cw [$][N];
    int gen [];
    int sent_cw, sent_sym, guard;
    longint t0;
    flit_t pend;
    TWO_T = N - k;
    // generator polynomial, gen[d] is the coefficient of x^d
    gen = new[TWO_T + 1];
    foreach (gen[d]) gen[d] = 0;
    gen[0] = 1;
    for (int i = 1; i <= TWO_T; i++)
      for (int d = i; d >= 0; d--)
        gen[d] = (d > 0 ? gen[d - 1] : 0) ^ gmul(gen[d], gexp[i]);
    // codewords: message in degrees 2t..254, parity = message * x^2t mod g
    for (int m = 0; m < ncw; m++) begin
      int c [N];
      int rem [];
      rem = new[TWO_T];
      foreach (rem[d]) rem[d] = 0;
      for (int d = N - 1; d >= TWO_T; d--) c[d] = $urandom_range(0, 255);
      for (int d = N - 1; d >= TWO_T; d--) begin
        int fb;
        fb = c[d] ^ rem[TWO_T - 1];
        for (int e = TWO_T - 1; e > 0; e--) rem[e] = rem[e - 1] ^ gmul(fb, gen[e]);
        rem[0] = gmul(fb, gen[0]);
      end
      for (int d = 0; d < TWO_T; d++) c[d] = rem[d];
      // every other codeword gets 1..t symbol errors
      if (m % 2 == 1)
        for (int e = 0; e < $urandom_range(1, TWO_T / 2); e++) c[$urandom_range(0, N - 1)] ^= $urandom_range(1, 255);
      cw.push_back(c);
    end
    configure(base, ncw);
    t0 = $time;
    sq.delete();
    sent_cw = 0; sent_sym = N - 1; pend = '0; guard = 0;
    while (sq.size() < ncw * TWO_T && guard < 2000000) begin
      @(negedge clk);
      west_in[0] = pend;
      pend = '0;
      if (sent_cw < ncw && west_in_ready[0][0]) begin
        pend = '{valid: 1'b1, vc: 2'd0, data: 32'(cw[sent_cw][sent_sym])};
        if (sent_sym == 0) begin sent_sym = N - 1; sent_cw++; end
        else sent_sym--;
      end
      guard++;
    end
    west_in = '0;
    $display("RS(255,%0d): %0d codewords in %0d cycles", k, ncw, ($time - t0) / 4);
    checks++;
    if (sq.size() != ncw * TWO_T) begin
      failures++; $display("FAIL RS(255,%0d): %0d of %0d syndrome words", k, sq.size(), ncw * TWO_T);
    end
    for (int m = 0; m < ncw; m++) begin
      int p;
      bit all_zero;
      p = 0;
      all_zero = 1'b1;
      for (int j = 0; j < NPE; j++)
        for (int i = j + 1; i <= TWO_T; i += NPE) begin
          int s;
          s = 0;
          for (int d = N - 1; d >= 0; d--) s = gmul(s, gexp[i]) ^ cw[m][d];
          if (s != 0) all_zero = 1'b0;
          checks++;
          if (m * TWO_T + p >= sq.size() || sq[m * TWO_T + p] !== 32'((i << 8) | s)) begin
            failures++;
            if (failures < 10) $display("FAIL RS(255,%0d) codeword %0d S%0d", k, m, i);
          end
          p++;
        end
      // a clean codeword has all-zero syndromes; one with errors does not
      checks++;
      if (all_zero != (m % 2 == 0)) begin failures++; $display("FAIL codeword %0d syndrome pattern", m); end
    end
    repeat (50) @(negedge clk);
    checks++;
    if (pe_halted !== '1) begin failures++; $display("FAIL PEs not halted after RS(255,%0d)", k); end
  endtask

  initial begin
    north_in = '0; south_in = '0; east_in = '0; west_in = '0;
    north_out_ready = '1; south_out_ready = '1; west_out_ready = '1; east_out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_rs(239, 6, 0);
    run_rs(217, 6, 'h1000);
    checks++;
    if (n_reconfig != 6) begin failures++; $display("FAIL %0d bank loads, expected 6", n_reconfig); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
