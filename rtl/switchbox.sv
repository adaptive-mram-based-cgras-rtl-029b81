// switchbox: schedule-driven 5-port crossbar beside each PE.
//
// Ports are N, E, S, W and L (the local PE), numbered as in cgra_pkg. Every
// input port has a vc_buffer with one FIFO per virtual channel. Every cycle a
// schedule entry (read from the schedule memory, one entry per cycle, the
// sequence repeating every sched_len cycles) tells each output port what to
// send:
//   * neighbour - the word arriving this cycle on input port src, if it
//                 carries the entry's VC; but if buffer src already holds words
//                 of that VC, its head goes instead, so a stream stays in order;
//   * buffered  - only the head of buffer src, VC vc;
//   * nothing.
// A transfer happens only if the next hop's ready bit for that VC is high; a
// transfer that cannot happen is skipped and the schedule moves on. Each
// input word that no output forwarded directly is written into its port's
// buffer, so nothing is ever dropped, and the buffers' ready bits stop the
// upstream neighbour before they overflow. One input word or one buffer head
// feeds at most one output per cycle.
//
// Timing: outputs are registered, so a hop costs one cycle. The entry used in
// cycle t was read from the schedule memory in cycle t-1. restart (from the
// configuration loader) starts the schedule at entry 0; hold stops all
// forwarding while the schedule memory is rewritten, though arriving words are
// still buffered.
//
// The multiplexer crossbar, the cycle-by-cycle schedule memory, the per-port
// buffers with flow control and the virtual channels follow the architecture;
// the entry format, the skip-on-stall rule and the ready protocol are this
// design's choices.
module switchbox
  import cgra_pkg::*;
#(
  parameter int unsigned SCHED_DEPTH = 512,
  parameter int unsigned BUF_DEPTH   = 4,
  localparam int unsigned SAW = $clog2(SCHED_DEPTH)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               hold,
  input  logic                               restart,
  input  logic                               sch_we,
  input  logic [SAW-1:0]                     sch_addr,
  input  logic [DATA_W-1:0]                  sch_wdata,
  input  logic [SAW:0]                       sched_len,
  input  flit_t       [NUM_PORTS-1:0]        in_flit,
  output logic        [NUM_PORTS-1:0][NUM_VC-1:0] in_ready,
  output flit_t       [NUM_PORTS-1:0]        out_flit,
  input  logic        [NUM_PORTS-1:0][NUM_VC-1:0] out_ready
);

  // --- schedule memory and sequencer -----------------------------------
  logic [SAW-1:0]    ptr;
  logic              running, entry_ok;
  logic [DATA_W-1:0] entry_q;
  sched_entry_t      entry;

  sdp_ram #(.DEPTH(SCHED_DEPTH), .WIDTH(DATA_W)) u_sched (
    .clk, .we(sch_we), .waddr(sch_addr), .wdata(sch_wdata),
    .re(running && !hold), .raddr(ptr), .rdata(entry_q)
  );

  assign entry = sched_entry_t'(entry_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr      <= '0;
      running  <= 1'b0;
      entry_ok <= 1'b0;
    end else if (restart) begin
      ptr      <= '0;
      running  <= (sched_len != '0);
      entry_ok <= 1'b0;
    end else if (hold) begin
      entry_ok <= 1'b0;
    end else if (running) begin
      entry_ok <= 1'b1;
      ptr      <= (32'(ptr) + 1 >= 32'(sched_len)) ? '0 : ptr + 1'b1;
    end
  end

  // --- input buffers ----------------------------------------------------
  logic [NUM_PORTS-1:0]                         take;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]             pop;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]             hvalid;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][DATA_W-1:0] hdata;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_buf
    vc_buffer #(.NVC(NUM_VC), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n, .in_flit(in_flit[p]), .in_take(take[p]),
      .ready(in_ready[p]), .pop(pop[p]),
      .head_valid(hvalid[p]), .head_data(hdata[p])
    );
  end

  // --- crossbar ------------------------------------------------------------
  flit_t [NUM_PORTS-1:0] nxt;
  // Event flags, per output, for observation: a word went out directly, a
  // word went out of a buffer, a scheduled transfer was blocked by ready.
  logic  [NUM_PORTS-1:0] ev_direct, ev_buffered, ev_blocked;

  always_comb begin
    route_t      r;
    int unsigned s;
    r           = '0;
    s           = 0;
    take        = '0;
    pop         = '0;
    nxt         = '0;
    ev_direct   = '0;
    ev_buffered = '0;
    ev_blocked  = '0;
    if (entry_ok && !hold) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        r = entry.route[o];
        s = 32'(r.src);
        if (s < NUM_PORTS) begin
          if (!r.from_buf && !hvalid[s][r.vc]) begin
            if (in_flit[s].valid && in_flit[s].vc == r.vc && !take[s]) begin
              if (out_ready[o][r.vc]) begin
                take[s]        = 1'b1;
                nxt[o]         = '{valid: 1'b1, vc: r.vc, data: in_flit[s].data};
                ev_direct[o]   = 1'b1;
              end else begin
                ev_blocked[o]  = 1'b1;
              end
            end
          end else begin
            if (hvalid[s][r.vc] && !pop[s][r.vc]) begin
              if (out_ready[o][r.vc]) begin
                pop[s][r.vc]   = 1'b1;
                nxt[o]         = '{valid: 1'b1, vc: r.vc, data: hdata[s][r.vc]};
                ev_buffered[o] = 1'b1;
              end else begin
                ev_blocked[o]  = 1'b1;
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_flit <= '0;
    else        out_flit <= nxt;
  end

endmodule
