// tb_pe: self-checking test of the processing element.
// Loads a program through the configuration port, restarts the PE and checks
// the words it sends. The program stores five input words (VC 1) to data
// memory with post-increment, reads them back, sends 3*x on VC 2 for each and
// finally sends 3*sum-1 on VC 3, then halts. Run 1 has all input ready and
// checks the cycle count (2 cycles per instruction, 37 instructions, plus
// the restart cycle). Run 2
// delivers input slowly, toggles the output ready and asserts hold at random,
// so the PE must stall; results must be the same.
module tb_pe;
  import cgra_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0, restart = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  flit_t in_flit, out_flit;
  logic [NUM_VC-1:0] in_ready, out_ready;
  logic halted;
  int checks = 0, failures = 0;

  pe #(.DMEM_DEPTH(1024), .CMEM_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPROG = 13;
  logic [31:0] prog [NPROG];
  initial begin
    prog[0]  = mk_li(DST_REG, 2'd0, 16'd0);
    prog[1]  = mk_li(DST_AR, 2'd0, 16'd100);
    prog[2]  = mk_li(DST_CNT, 2'd0, 16'd4);
    prog[3]  = mk_alu(OP_ADD, SRC_PORT, SRC_IMM, DST_DMEM, 2'd0, 2'd0, 2'd0, 2'd1, 1'b1, 12'd0);
    prog[4]  = mk_loop(15'd3);
    prog[5]  = mk_li(DST_AR, 2'd0, 16'd100);
    prog[6]  = mk_li(DST_CNT, 2'd0, 16'd4);
    prog[7]  = mk_alu(OP_MUL, SRC_DMEM, SRC_IMM, DST_REG, 2'd0, 2'd0, 2'd1, 2'd0, 1'b1, 12'd3);
    prog[8]  = mk_alu(OP_ADD, SRC_REG, SRC_REG, DST_REG, 2'd0, 2'd1, 2'd0, 2'd0, 1'b0, 12'd0);
    prog[9]  = mk_alu(OP_PASSA, SRC_REG, SRC_IMM, DST_PORT, 2'd1, 2'd0, 2'd0, 2'd2, 1'b0, 12'd0);
    prog[10] = mk_loop(15'd7);
    prog[11] = mk_alu(OP_ADD, SRC_REG, SRC_IMM, DST_PORT, 2'd0, 2'd0, 2'd0, 2'd3, 1'b0, 12'hFFF);
    prog[12] = mk_halt();
  end

  logic [31:0] xin [5];
  logic [31:0] got [$];
  logic [1:0]  gotvc [$];
  bit slow;

  // sink: records words, random ready in slow mode
  always @(posedge clk) if (out_flit.valid) begin
    got.push_back(out_flit.data);
    gotvc.push_back(out_flit.vc);
  end

  task automatic run(bit slow_mode, output int cycles);
    int sent;
    slow = slow_mode;
    got.delete(); gotvc.delete();
    for (int i = 0; i < 5; i++) xin[i] = $urandom_range(0, 100000);
    @(negedge clk); restart = 1;
    @(negedge clk); restart = 0;
    cycles = 1; sent = 0;
    while (!halted) begin
      // drive the next input word (registered-link style, one per cycle)
      in_flit = '0;
      if (sent < 5 && in_ready[1] && (!slow || $urandom_range(0, 3) == 0)) begin
        in_flit = '{valid: 1'b1, vc: 2'd1, data: xin[sent]};
        sent++;
      end
      out_ready = slow ? 4'($urandom) : 4'hF;
      hold      = slow ? ($urandom_range(0, 9) == 0) : 1'b0;
      @(negedge clk);
      cycles++;
    end
    in_flit = '0; hold = 0; out_ready = 4'hF;
  endtask

  task automatic check_results();
    logic [31:0] sum;
    sum = 0;
    checks++;
    if (got.size() != 6) begin
      failures++; $display("FAIL got %0d words", got.size());
      return;
    end
    for (int i = 0; i < 5; i++) begin
      sum += 3 * xin[i];
      checks += 2;
      if (got[i] !== 3 * xin[i]) begin failures++; $display("FAIL word %0d %h", i, got[i]); end
      if (gotvc[i] !== 2'd2) begin failures++; $display("FAIL vc %0d", i); end
    end
    checks += 2;
    if (got[5] !== sum - 1) begin failures++; $display("FAIL sum %h exp %h", got[5], sum - 1); end
    if (gotvc[5] !== 2'd3) begin failures++; $display("FAIL sum vc"); end
  endtask

  initial begin
    int cyc;
    in_flit = '0; out_ready = 4'hF;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (!halted) begin failures++; $display("FAIL not idle after reset"); end
    for (int i = 0; i < NPROG; i++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 8'(i); cfg_wdata = prog[i];
    end
    @(negedge clk); cfg_we = 0;
    run(1'b0, cyc);
    check_results();
    $display("fast run: %0d cycles", cyc);
    checks++; if (cyc != 75) begin failures++; $display("FAIL cycle count %0d, expected 75", cyc); end
    run(1'b1, cyc);
    check_results();
    $display("stalled run: %0d cycles", cyc);
    checks++; if (cyc <= 75) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
