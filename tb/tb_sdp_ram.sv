// tb_sdp_ram: self-checking test of the simple dual-port RAM at the PE
// data-memory size (36864 x 32). Writes a pattern, reads it back with the
// one-cycle latency, checks read-during-write returns old data and that rdata
// holds while re is low.
module tb_sdp_ram;
  localparam int DEPTH = 36864;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    // fill every address
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = 32'(i) * 32'h9E37_79B9 ^ 32'h1234_5678;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read back a spread of addresses
    for (int i = 0; i < DEPTH; i += 97) begin
      @(negedge clk); re = 1; raddr = AW'(i);
      @(negedge clk); re = 0;
      expect_eq(rdata, model[i], "readback");
    end
    // last address
    @(negedge clk); re = 1; raddr = AW'(DEPTH - 1);
    @(negedge clk); re = 0;
    expect_eq(rdata, model[DEPTH-1], "last address");
    // rdata holds while re is low
    repeat (3) @(negedge clk);
    expect_eq(rdata, model[DEPTH-1], "hold");
    // read during write to the same address returns old data
    @(negedge clk); re = 1; raddr = 16'd100; we = 1; waddr = 16'd100; wdata = 32'hCAFE_F00D;
    @(negedge clk); re = 0; we = 0;
    expect_eq(rdata, model[100], "read-during-write old data");
    @(negedge clk); re = 1; raddr = 16'd100;
    @(negedge clk); re = 0;
    expect_eq(rdata, 32'hCAFE_F00D, "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
