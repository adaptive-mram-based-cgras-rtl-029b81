// tb_config_loader: self-checking test of the per-bank configuration loader.
// An MRAM bank model is filled with two configurations of different sizes. The
// loader is started on each; every PE configuration word and schedule word
// written to each of the four lanes is compared with the bank contents, the
// sched_len output, the restart and done pulses and the busy time
// ((pe_len + sb_len) * 3 + 1 cycles with a one-cycle bank read) are checked.
module tb_config_loader;
  import cgra_pkg::*;
  localparam int LANES = 4;
  localparam int BD = 4096, CD = 1024, SD = 512;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] base = '0;
  logic [10:0] pe_len = '0;
  logic [9:0]  sb_len = '0;
  logic busy, done, restart;
  logic [9:0] sched_len;
  logic m_req, m_ready, m_rvalid;
  logic [11:0] m_addr;
  logic [127:0] m_rdata;
  logic cfg_we, sch_we;
  logic [9:0] cfg_addr;
  logic [8:0] sch_addr;
  logic [LANES-1:0][31:0] cfg_wdata, sch_wdata;
  // host-side bank write port used to fill the bank
  logic h_req = 0;
  logic [11:0] h_addr = '0;
  logic [127:0] h_wdata = '0;
  int checks = 0, failures = 0;

  config_loader #(.LANES(LANES), .BANK_DEPTH(BD), .CMEM_DEPTH(CD), .SCHED_DEPTH(SD)) dut (.*);

  mram_bank #(.DEPTH(BD), .WIDTH(128)) u_bank (
    .clk, .rst_n, .req(busy ? m_req : h_req), .we(!busy), .addr(busy ? m_addr : h_addr),
    .wdata(h_wdata), .ready(m_ready), .rvalid(m_rvalid), .rdata(m_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] pattern(int a);
    logic [127:0] w;
    for (int l = 0; l < 4; l++) w[32*l +: 32] = 32'(a) * 32'h0001_0003 + 32'(l) * 32'h1111_0000;
    return w;
  endfunction

  logic [31:0] cmem [LANES][CD];
  logic [31:0] smem [LANES][SD];
  int n_restart = 0, n_done = 0;
  always @(posedge clk) begin
    if (cfg_we) for (int l = 0; l < LANES; l++) cmem[l][cfg_addr] <= cfg_wdata[l];
    if (sch_we) for (int l = 0; l < LANES; l++) smem[l][sch_addr] <= sch_wdata[l];
    if (rst_n && restart) n_restart++;
    if (rst_n && done) n_done++;
  end

  task automatic load_and_check(int b, int pl, int sl);
    int busy_cycles;
    @(negedge clk);
    start = 1; base = 12'(b); pe_len = 11'(pl); sb_len = 10'(sl);
    @(negedge clk); start = 0;
    busy_cycles = 0;
    while (busy) begin busy_cycles++; @(negedge clk); end
    checks++;
    if (busy_cycles != (pl + sl) * 3 + 1) begin
      failures++; $display("FAIL busy %0d cycles, expected %0d", busy_cycles, (pl + sl) * 3 + 1);
    end
    @(negedge clk);
    for (int l = 0; l < LANES; l++) begin
      for (int i = 0; i < pl; i++) begin
        checks++;
        if (cmem[l][i] !== pattern(b + i)[32*l +: 32]) begin
          failures++; $display("FAIL cmem lane %0d addr %0d", l, i);
        end
      end
      for (int i = 0; i < sl; i++) begin
        checks++;
        if (smem[l][i] !== pattern(b + pl + i)[32*l +: 32]) begin
          failures++; $display("FAIL smem lane %0d addr %0d", l, i);
        end
      end
    end
    checks++;
    if (sched_len !== 10'(sl)) begin failures++; $display("FAIL sched_len"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the bank
    for (int a = 0; a < 1200; a++) begin
      @(negedge clk);
      while (!m_ready) @(negedge clk);
      h_req = 1; h_addr = 12'(a); h_wdata = pattern(a);
      @(negedge clk); h_req = 0;
    end
    repeat (3) @(negedge clk);
    load_and_check(0, 300, 40);
    load_and_check(500, 120, 512);
    checks += 2;
    if (n_restart != 2) begin failures++; $display("FAIL restart pulses %0d", n_restart); end
    if (n_done != 2) begin failures++; $display("FAIL done pulses %0d", n_done); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
