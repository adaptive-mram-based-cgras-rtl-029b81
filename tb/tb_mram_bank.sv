// tb_mram_bank: self-checking test of the MRAM bank model at full size
// (262144 x 128). Checks the access latencies derived from the 1.67 ns read
// and 5.88 ns write times at a 4 ns clock (1 and 2 cycles), that ready is low
// while an access is in progress, and data integrity over random addresses
// including the first and last word, and the access counters.
module tb_mram_bank;
  localparam int DEPTH = 262144;
  logic clk = 0, rst_n = 0, req = 0, we = 0;
  logic [17:0] addr = '0;
  logic [127:0] wdata = '0, rdata;
  logic ready, rvalid;
  int checks = 0, failures = 0;
  logic [127:0] model [int];

  mram_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(logic [17:0] a, logic [127:0] d, output int lat);
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
    lat = 0;
    while (!ready) begin @(negedge clk); lat++; end
    model[int'(a)] = d;
  endtask

  task automatic read_word(logic [17:0] a, output logic [127:0] d, output int lat);
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = 1; we = 0; addr = a;
    @(negedge clk);
    req = 0;
    lat = 0;
    checks++;
    if (ready && !rvalid) begin failures++; $display("FAIL ready during read"); end
    while (!rvalid) begin @(negedge clk); lat++; end
    d = rdata;
  endtask

  initial begin
    int lat;
    logic [127:0] d;
    logic [17:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_word(18'd0, {4{32'h0123_4567}}, lat);
    checks++; if (lat != 2) begin failures++; $display("FAIL write latency %0d", lat); end
    write_word(18'(DEPTH - 1), {4{32'hFEDC_BA98}}, lat);
    for (int i = 0; i < 2000; i++) begin
      a = 18'($urandom);
      write_word(a, {$urandom, $urandom, $urandom, $urandom}, lat);
    end
    read_word(18'd0, d, lat);
    checks += 2;
    if (lat != 1) begin failures++; $display("FAIL read latency %0d", lat); end
    if (d !== model[0]) begin failures++; $display("FAIL word 0"); end
    read_word(18'(DEPTH - 1), d, lat);
    checks++; if (d !== model[DEPTH-1]) begin failures++; $display("FAIL last word"); end
    foreach (model[k]) begin
      read_word(18'(k), d, lat);
      checks++;
      if (d !== model[k]) begin failures++; $display("FAIL addr %0d", k); end
    end
    // access counters: every accepted request counted once
    checks += 2;
    if (dut.n_writes != 64'd2002) begin failures++; $display("FAIL %0d writes counted", dut.n_writes); end
    if (dut.n_reads != 64'(2 + model.num())) begin failures++; $display("FAIL %0d reads counted", dut.n_reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
