// mirod_monitor: monitoring branch of the read-out driver.
//
// Selects events for monitoring and writes them into the monitoring FIFO,
// which is read through the register bus. Five criteria, as the system
// description lists them, each enabled by a bit of crit_en:
//   [0] every event, [1] every n-th event (nth, 0 counts as 1),
//   [2] BC number equals bcid_sel, [3] event number equals evid_sel,
//   [4] monitoring flag set.
// crit_and = 0 selects an event when any enabled criterion holds,
// crit_and = 1 only when all of them hold (the combination rule is this
// design's reading). A selected event is stored as
//   {4'hE, mon, err[3:0], 4'b0, evid[18:0]}, {2'b0, bcid, mult}, ncand,
//   then one word per candidate,
// provided the FIFO has room for all of it; otherwise the event is
// skipped and counted in dropped. irq is high while the FIFO holds at
// least `watermark` words, for an interrupt to the control processor.
// Timing: three cycles for the header words, then one candidate per cycle.
module mirod_monitor
  import muctpi_pkg::*;
#(
  parameter int MON_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  crit_en,
  input  logic        crit_and,
  input  logic [15:0] nth,
  input  logic [11:0] bcid_sel,
  input  logic [18:0] evid_sel,
  input  logic [$clog2(MON_DEPTH):0] watermark,
  input  logic        in_valid,
  output logic        in_ready,
  input  ev_item_t    in_item,
  input  logic        mon_rd,
  output logic [31:0] mon_rdata,
  output logic        mon_empty,
  output logic [$clog2(MON_DEPTH):0] mon_count,
  output logic        irq,
  output logic [15:0] dropped
);
  typedef enum logic [2:0] {IDLE, W0, W1, W2, CAND} st_t;
  st_t st;
  ev_hdr_t h;
  logic    sel;
  logic [11:0] left;
  logic [15:0] ev_cnt;
  logic [4:0]  m;
  logic        nth_hit, sel_d, fits;
  logic        wr, full;
  logic [31:0] wdata;

  assign nth_hit = (ev_cnt + 16'd1 >= nth);
  always_comb begin
    m = {in_item.hdr.mon, in_item.hdr.evid == evid_sel, in_item.hdr.bcid == bcid_sel, nth_hit, 1'b1};
    sel_d = crit_and ? ((crit_en != 0) && ((m | ~crit_en) == 5'h1F)) : ((m & crit_en) != 0);
    fits  = int'(mon_count) + 3 + int'(in_item.hdr.ncand) <= MON_DEPTH;
  end

  always_comb begin
    in_ready = (st == IDLE) || (st == CAND);
    wr = 1'b0;
    wdata = '0;
    case (st)
      W0: begin wr = 1'b1; wdata = {4'hE, h.mon, h.err, 4'h0, h.evid}; end
      W1: begin wr = 1'b1; wdata = {2'b00, h.bcid, h.mult}; end
      W2: begin wr = 1'b1; wdata = 32'(h.ncand); end
      CAND: begin wr = sel && in_valid; wdata = cand_word(in_item.cand); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= IDLE; h <= '0; sel <= 1'b0; left <= '0; ev_cnt <= '0; dropped <= '0;
    end else begin
      case (st)
        IDLE: if (in_valid && in_item.is_hdr) begin
          h      <= in_item.hdr;
          left   <= in_item.hdr.ncand;
          sel    <= sel_d && fits;
          ev_cnt <= nth_hit ? 16'd0 : ev_cnt + 16'd1;
          if (sel_d && !fits) dropped <= dropped + 1'b1;
          if (sel_d && fits)                 st <= W0;
          else if (in_item.hdr.ncand != 0)   st <= CAND;
        end
        W0: st <= W1;
        W1: st <= W2;
        W2: st <= (left == 0) ? IDLE : CAND;
        CAND: if (in_valid) begin
          left <= left - 1'b1;
          if (left == 12'd1) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end

  sync_fifo #(.WIDTH(32), .DEPTH(MON_DEPTH)) u_mf (
    .clk, .rst_n, .wr, .wdata, .rd(mon_rd), .rdata(mon_rdata),
    .empty(mon_empty), .full, .count(mon_count));

  assign irq = (watermark != 0) && (mon_count >= watermark);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr && full));
endmodule
