// tb_vc_buffer: self-checking test of the per-VC input buffer.
// A sender that obeys ready pushes random words on random VCs while a random
// consumer pops; every VC is compared with a queue model, ready must never let
// a FIFO overflow, in_take words must not be stored, and ready must drop when
// a VC fills.
module tb_vc_buffer;
  import cgra_pkg::*;
  localparam int NVC = 4, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  flit_t in_flit;
  logic in_take;
  logic [NVC-1:0] ready, pop, head_valid;
  logic [NVC-1:0][31:0] head_data;
  int checks = 0, failures = 0, ready_low = 0;
  logic [31:0] q [NVC][$];

  vc_buffer #(.NVC(NVC), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender registers its word, like a switchbox output
  logic          want;
  logic [1:0]    wvc;
  logic          prev_ready_ok;

  initial begin
    in_flit = '0; in_take = 0; pop = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // check heads against the model
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (head_valid[v] !== (q[v].size() != 0)) begin
          failures++; $display("FAIL head_valid vc%0d", v);
        end else if (head_valid[v]) begin
          checks++;
          if (head_data[v] !== q[v][0]) begin failures++; $display("FAIL data vc%0d", v); end
        end
        checks++;
        if (ready[v] !== (q[v].size() + 2 <= DEPTH)) begin failures++; $display("FAIL ready vc%0d", v); end
        if (!ready[v]) ready_low++;
      end
      // consumer: pop with low probability on VC 0 so it fills
      for (int v = 0; v < NVC; v++)
        pop[v] = head_valid[v] && ($urandom_range(0, 99) < ((v == 0) ? 15 : 60));
      // the flit decided last cycle (in_flit) arrives now; decide next
      in_take = in_flit.valid && ($urandom_range(0, 9) == 0);
      // model update happens at the edge: apply at posedge below
      @(posedge clk);
      for (int v = 0; v < NVC; v++) if (pop[v]) void'(q[v].pop_front());
      if (in_flit.valid && !in_take) q[in_flit.vc].push_back(in_flit.data);
      for (int v = 0; v < NVC; v++) begin
        checks++;
        if (q[v].size() > DEPTH) begin failures++; $display("FAIL overflow model vc%0d", v); end
      end
      // next word, chosen from ready sampled before the edge
      wvc  = 2'($urandom_range(0, NVC - 1));
      want = ($urandom_range(0, 3) != 0) && prev_ready_ok;
      #1;
      in_flit.valid = want && ready[wvc] && (q[wvc].size() + 1 < DEPTH) ? 1'b1 : 1'b0;
      in_flit.vc    = wvc;
      in_flit.data  = $urandom;
    end
    checks++;
    if (ready_low == 0) begin failures++; $display("FAIL ready never dropped"); end
    $display("ready low %0d VC-cycles", ready_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  assign prev_ready_ok = 1'b1;
endmodule
