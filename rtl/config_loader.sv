// config_loader: moves one configuration from an MRAM bank into the PE
// configuration memories and switchbox schedule memories of the LANES
// PE/switchbox pairs that share the bank.
//
// How it works. A start pulse latches base, pe_len and sb_len and raises
// busy, which holds the pairs. The loader then reads bank words
// base .. base+pe_len-1 one at a time; lane c (bits 32c+31..32c) of word i is
// written to configuration-memory address i of pair c, all lanes in the same
// cycle. It continues with words base+pe_len .. base+pe_len+sb_len-1, lane c
// going to schedule-memory address i of pair c. Finally it sets sched_len,
// pulses restart (the pairs start their programs and schedules from 0), drops
// busy and pulses done.
//
// Timing: one bank access at a time; busy stays high for
// (pe_len + sb_len) * (2 + bank read cycles) + 1 cycles.
//
// Loading all pairs of a bank together from one wide bank follows the
// architecture; the address layout of a configuration in the bank and the
// hold-then-restart sequence are this design's own.
module config_loader
  import cgra_pkg::*;
#(
  parameter int unsigned LANES       = 4,
  parameter int unsigned BANK_DEPTH  = 262144,
  parameter int unsigned CMEM_DEPTH  = 24576,
  parameter int unsigned SCHED_DEPTH = 512,
  localparam int unsigned BAW = $clog2(BANK_DEPTH),
  localparam int unsigned CAW = $clog2(CMEM_DEPTH),
  localparam int unsigned SAW = $clog2(SCHED_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command
  input  logic                          start,
  input  logic [BAW-1:0]                base,
  input  logic [CAW:0]                  pe_len,
  input  logic [SAW:0]                  sb_len,
  output logic                          busy,
  output logic                          done,
  output logic                          restart,
  output logic [SAW:0]                  sched_len,
  // bank
  output logic                          m_req,
  output logic [BAW-1:0]                m_addr,
  input  logic                          m_ready,
  input  logic                          m_rvalid,
  input  logic [LANES*DATA_W-1:0]       m_rdata,
  // writes into the pairs
  output logic                          cfg_we,
  output logic [CAW-1:0]                cfg_addr,
  output logic [LANES-1:0][DATA_W-1:0]  cfg_wdata,
  output logic                          sch_we,
  output logic [SAW-1:0]                sch_addr,
  output logic [LANES-1:0][DATA_W-1:0]  sch_wdata
);

  typedef enum logic [2:0] {L_IDLE, L_REQ, L_WAIT, L_FINISH} lstate_e;

  lstate_e        st;
  logic           phase_sb;    // 0: PE configuration words, 1: schedule words
  logic [CAW:0]   idx;
  logic [BAW-1:0] addr;
  logic [CAW:0]   pe_len_q;
  logic [SAW:0]   sb_len_q;

  assign busy   = (st != L_IDLE);
  assign m_req  = (st == L_REQ);
  assign m_addr = addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= L_IDLE;
      phase_sb  <= 1'b0;
      idx       <= '0;
      addr      <= '0;
      pe_len_q  <= '0;
      sb_len_q  <= '0;
      sched_len <= '0;
      done      <= 1'b0;
      restart   <= 1'b0;
      cfg_we    <= 1'b0;
      cfg_addr  <= '0;
      cfg_wdata <= '0;
      sch_we    <= 1'b0;
      sch_addr  <= '0;
      sch_wdata <= '0;
    end else begin
      done    <= 1'b0;
      restart <= 1'b0;
      cfg_we  <= 1'b0;
      sch_we  <= 1'b0;
      unique case (st)
        L_IDLE: if (start) begin
          pe_len_q <= pe_len;
          sb_len_q <= sb_len;
          addr     <= base;
          idx      <= '0;
          phase_sb <= (pe_len == '0);
          st       <= (pe_len == '0 && sb_len == '0) ? L_FINISH : L_REQ;
        end
        L_REQ: if (m_ready) st <= L_WAIT;
        L_WAIT: if (m_rvalid) begin
          if (!phase_sb) begin
            cfg_we    <= 1'b1;
            cfg_addr  <= CAW'(idx);
            cfg_wdata <= m_rdata;
          end else begin
            sch_we    <= 1'b1;
            sch_addr  <= SAW'(idx);
            sch_wdata <= m_rdata;
          end
          addr <= addr + 1'b1;
          if (!phase_sb && idx + 1'b1 == pe_len_q) begin
            idx      <= '0;
            phase_sb <= 1'b1;
            st       <= (sb_len_q == '0) ? L_FINISH : L_REQ;
          end else if (phase_sb && idx + 1'b1 == (CAW+1)'(sb_len_q)) begin
            st       <= L_FINISH;
          end else begin
            idx      <= idx + 1'b1;
            st       <= L_REQ;
          end
        end
        L_FINISH: begin
          sched_len <= sb_len_q;
          restart   <= 1'b1;
          done      <= 1'b1;
          st        <= L_IDLE;
        end
        default: st <= L_IDLE;
      endcase
    end
  end

endmodule
