// mram_bank: behavioural model of one STT-MRAM configuration-cache bank.
//
// This is a behavioural model, not synthesizable logic for a real part: the
// magnetic tunnel junction array, its sense amplifiers and write drivers are a
// process-specific macro. The model keeps the macro's port list and its timing
// at clock-cycle level.
//
// A request (req high while ready is high) is accepted at the clock edge.
// A read completes READ_CYC cycles later: rdata is loaded and rvalid is high
// for one cycle. A write is committed WRITE_CYC cycles later. ready is low
// while an access is in progress; only one access is in flight. Cycle counts
// are the macro's access times rounded up to whole clock periods:
// READ_CYC = ceil(READ_PS / CLK_PS), WRITE_CYC = ceil(WRITE_PS / CLK_PS).
//
// The 256K x 128 organisation and the 1.67 ns read / 5.88 ns write times are
// those of the 4 MB MRAM bank in the architecture's comparison table; the 4 ns
// clock period is this design's assumption. The array is not cleared by reset
// (the cells are non-volatile).
//
// n_reads and n_writes count accepted accesses since reset. They have no
// port: they are statistics for a testbench, which can multiply them by the
// macro's per-access energies to estimate configuration-cache energy.
module mram_bank #(
  parameter int unsigned DEPTH    = 262144,
  parameter int unsigned WIDTH    = 128,
  parameter int unsigned READ_PS  = 1670,
  parameter int unsigned WRITE_PS = 5880,
  parameter int unsigned CLK_PS   = 4000,
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned READ_CYC  = (READ_PS + CLK_PS - 1) / CLK_PS,
  localparam int unsigned WRITE_CYC = (WRITE_PS + CLK_PS - 1) / CLK_PS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic             ready,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] cells [DEPTH];

  logic [3:0]       busy_cnt;
  logic             op_we;
  logic [AW-1:0]    op_addr;
  logic [WIDTH-1:0] op_wdata;
  logic [63:0]      n_reads, n_writes;

  assign ready = (busy_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt <= '0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      op_we    <= 1'b0;
      op_addr  <= '0;
      op_wdata <= '0;
      n_reads  <= '0;
      n_writes <= '0;
    end else begin
      rvalid <= 1'b0;
      if (ready && req) begin
        busy_cnt <= 4'(we ? WRITE_CYC : READ_CYC);
        op_we    <= we;
        op_addr  <= addr;
        op_wdata <= wdata;
        if (we) n_writes <= n_writes + 1'b1;
        else    n_reads  <= n_reads + 1'b1;
      end else if (busy_cnt != '0) begin
        busy_cnt <= busy_cnt - 1'b1;
        if (busy_cnt == 4'd1) begin
          if (op_we) begin
            cells[op_addr] <= op_wdata;
          end else begin
            rdata  <= cells[op_addr];
            rvalid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
