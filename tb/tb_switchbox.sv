// tb_switchbox: self-checking test of the schedule-driven switchbox.
// Loads a two-entry schedule that routes five streams, each on its own VC:
//   W vc0 -> E (neighbour route in entry 0, buffer-only in entry 1)
//   N vc1 -> L (buffer-only in entry 0)
//   S vc3 -> N (neighbour route in entry 0)
//   E vc2 -> W (buffer-only in entry 0)
//   L vc2 -> S (neighbour route in entry 1)
// Random senders obey the per-VC ready with a one-cycle link register, and
// random receivers drop ready. Every stream must arrive complete and in order
// on the right port and VC. The test also counts direct transfers, buffered
// transfers and transfers blocked by ready, and requires each to occur, then
// checks that hold stops all output.
module tb_switchbox;
  import cgra_pkg::*;
  localparam int SD = 512;
  logic clk = 0, rst_n = 0, hold = 0, restart = 0;
  logic sch_we = 0;
  logic [8:0] sch_addr = '0;
  logic [31:0] sch_wdata = '0;
  logic [9:0] sched_len = '0;
  flit_t [4:0] in_flit, out_flit;
  logic  [4:0][3:0] in_ready, out_ready;
  int checks = 0, failures = 0;
  int n_direct = 0, n_buf = 0, n_blocked = 0;

  switchbox #(.SCHED_DEPTH(SD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream table: source port, vc, destination port
  localparam int NS = 5;
  int src_p [NS] = '{PORT_W, PORT_N, PORT_S, PORT_E, PORT_L};
  int vc_of [NS] = '{0, 1, 3, 2, 2};
  int dst_p [NS] = '{PORT_E, PORT_L, PORT_N, PORT_W, PORT_S};
  localparam int WORDS = 300;
  int sent [NS];
  logic [31:0] rx [NS][$];
  bit traffic_on;

  function automatic logic [31:0] word(int s, int i);
    return {8'(s), 24'(i * 7 + 3)};
  endfunction

  // receivers
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_flit[o].valid) begin
      int k; k = -1;
      for (int s = 0; s < NS; s++) if (dst_p[s] == o && vc_of[s] == 32'(out_flit[o].vc)) k = s;
      checks++;
      if (k < 0) begin failures++; $display("FAIL unexpected word on port %0d vc %0d", o, out_flit[o].vc); end
      else rx[k].push_back(out_flit[o].data);
    end
    n_direct  += $countones(dut.ev_direct);
    n_buf     += $countones(dut.ev_buffered);
    n_blocked += $countones(dut.ev_blocked);
  end

  // senders: decide with this cycle's ready, present next cycle
  flit_t [4:0] pend;
  initial begin
    sched_entry_t e0, e1;
    in_flit = '0; out_ready = '1; pend = '0;
    traffic_on = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    e0 = '0; e1 = '0;
    for (int o = 0; o < 5; o++) begin
      e0.route[o] = mk_route(7, 1'b0, 2'd0);
      e1.route[o] = mk_route(7, 1'b0, 2'd0);
    end
    e0.route[PORT_E] = mk_route(PORT_W, 1'b0, 2'd0);
    e0.route[PORT_L] = mk_route(PORT_N, 1'b1, 2'd1);
    e0.route[PORT_N] = mk_route(PORT_S, 1'b0, 2'd3);
    e0.route[PORT_W] = mk_route(PORT_E, 1'b1, 2'd2);
    e1.route[PORT_E] = mk_route(PORT_W, 1'b1, 2'd0);
    e1.route[PORT_S] = mk_route(PORT_L, 1'b0, 2'd2);
    @(negedge clk); sch_we = 1; sch_addr = 0; sch_wdata = e0;
    @(negedge clk); sch_we = 1; sch_addr = 1; sch_wdata = e1;
    @(negedge clk); sch_we = 0; sched_len = 10'd2; restart = 1;
    @(negedge clk); restart = 0;
    traffic_on = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      in_flit = pend;
      pend = '0;
      for (int s = 0; s < NS; s++) begin
        if (sent[s] < WORDS && !pend[src_p[s]].valid && in_ready[src_p[s]][vc_of[s]] &&
            $urandom_range(0, 2) == 0) begin
          pend[src_p[s]] = '{valid: 1'b1, vc: 2'(vc_of[s]), data: word(s, sent[s])};
          sent[s]++;
        end
      end
      for (int o = 0; o < 5; o++) out_ready[o] = (cyc > 5000) ? 4'hF : 4'($urandom);
      @(negedge clk);
    end
    in_flit = pend; pend = '0;
    @(negedge clk); in_flit = '0;
    repeat (40) @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (rx[s].size() != WORDS) begin
        failures++; $display("FAIL stream %0d got %0d of %0d", s, rx[s].size(), WORDS);
      end
      for (int i = 0; i < rx[s].size() && i < WORDS; i++) begin
        checks++;
        if (rx[s][i] !== word(s, i)) begin failures++; $display("FAIL stream %0d word %0d", s, i); end
      end
    end
    $display("direct=%0d buffered=%0d blocked=%0d", n_direct, n_buf, n_blocked);
    checks += 3;
    if (n_direct == 0)  begin failures++; $display("FAIL no direct transfer"); end
    if (n_buf == 0)     begin failures++; $display("FAIL no buffered transfer"); end
    if (n_blocked == 0) begin failures++; $display("FAIL no blocked transfer"); end
    // hold: no output while held, words still buffered
    @(negedge clk); hold = 1;
    in_flit[PORT_N] = '{valid: 1'b1, vc: 2'd1, data: 32'hABCD_0001};
    @(negedge clk); in_flit = '0;
    repeat (5) begin
      @(negedge clk);
      checks++; if (out_flit[PORT_L].valid) begin failures++; $display("FAIL output during hold"); end
    end
    hold = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (rx[1].size() != WORDS + 1 || rx[1][WORDS] !== 32'hABCD_0001) begin
      failures++; $display("FAIL word held across hold not delivered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
