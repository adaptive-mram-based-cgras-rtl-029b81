// tb_cgra_variants: runs the array top at the two other bank shapes of the
// architecture's MRAM comparison, side by side: one 256K x 384 bank for all
// twelve pairs (1 x 12 array, 2.74 ns read / 6.73 ns write) and twelve
// 256K x 32 banks, one per pair (12 x 1 array, 1.30 ns / 5.36 ns). Bank
// depth and memories are reduced; see tb_cgra_variant_run for what each run
// checks. Prints the combined counts.
module tb_cgra_variants;
  logic clk = 0;
  always #2 clk = ~clk;

  logic done_w, done_n;
  int checks_w, failures_w, checks_n, failures_n;

  tb_cgra_variant_run #(.ROWS(1), .COLS(12), .READ_PS(2740), .WRITE_PS(6730)) u_wide (
    .clk(clk), .done(done_w), .checks(checks_w), .failures(failures_w));
  tb_cgra_variant_run #(.ROWS(12), .COLS(1), .READ_PS(1300), .WRITE_PS(5360)) u_narrow (
    .clk(clk), .done(done_n), .checks(checks_n), .failures(failures_n));

  initial begin
    fork
      begin
        wait (done_w === 1'b1 && done_n === 1'b1);
        repeat (2) @(posedge clk);
        $display("TB_RESULT checks=%0d failures=%0d", checks_w + checks_n, failures_w + failures_n);
      end
      begin
        repeat (200000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks_w + checks_n, failures_w + failures_n + 1);
      end
    join_any
    $finish;
  end
endmodule
