// vc_buffer: input-port buffer with one FIFO per virtual channel.
//
// A word arriving on in_flit (valid, vc, data) is stored in FIFO in_flit.vc
// unless in_take is high in the same cycle, meaning the owner forwarded it
// directly. pop[v] removes the head of FIFO v; head_valid/head_data show each
// head. Several VCs may be popped in one cycle, and a VC may be pushed and
// popped in the same cycle.
//
// Flow control: ready[v] is high while FIFO v has at least two free slots.
// Links have one register stage, so a sender that sees ready in cycle t may
// still have the word of cycle t-1 in flight; two free slots cover both and the
// FIFO cannot overflow. ready is a register-only function (no combinational
// path from the inputs). The per-VC buffering follows the architecture's
// description; the depth, the VC count and this ready rule are this design's
// choices. DEPTH must be at least 2.
module vc_buffer
  import cgra_pkg::*;
#(
  parameter int unsigned NVC   = 4,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  flit_t                   in_flit,
  input  logic                    in_take,
  output logic [NVC-1:0]          ready,
  input  logic [NVC-1:0]          pop,
  output logic [NVC-1:0]          head_valid,
  output logic [NVC-1:0][DATA_W-1:0] head_data
);

  logic [DATA_W-1:0] store [NVC][DEPTH];
  logic [PW-1:0]     rd_ptr [NVC];
  logic [PW-1:0]     wr_ptr [NVC];
  logic [CW-1:0]     count  [NVC];

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      head_valid[v] = (count[v] != '0);
      head_data[v]  = store[v][rd_ptr[v]];
      ready[v]      = (32'(count[v]) + 2 <= DEPTH);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        rd_ptr[v] <= '0;
        wr_ptr[v] <= '0;
        count[v]  <= '0;
      end
    end else begin
      for (int v = 0; v < NVC; v++) begin
        logic push, pp;
        push = in_flit.valid && !in_take && (32'(in_flit.vc) == v);
        pp   = pop[v] && head_valid[v];
        if (push) begin
          store[v][wr_ptr[v]] <= in_flit.data;
          wr_ptr[v]           <= ptr_inc(wr_ptr[v]);
        end
        if (pp) rd_ptr[v] <= ptr_inc(rd_ptr[v]);
        count[v] <= count[v] + CW'(push) - CW'(pp);
      end
    end
  end

  // A push into a full FIFO means the sender ignored ready.
  for (genvar v = 0; v < NVC; v++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      !(in_flit.valid && !in_take && 32'(in_flit.vc) == v && 32'(count[v]) == DEPTH && !pop[v]))
      else $error("vc_buffer: overflow on VC %0d", v);
    assert property (@(posedge clk) disable iff (!rst_n) !(pop[v] && count[v] == '0))
      else $error("vc_buffer: pop from empty VC %0d", v);
  end

endmodule
