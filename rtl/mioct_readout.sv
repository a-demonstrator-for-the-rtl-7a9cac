// mioct_readout: L1A pipeline and event-fragment builder of an octant module.
//
// Every BC the 14 aligned sector words and their BC number are written into
// a circular pipeline memory. A Level-1 Accept refers to the BC whose data
// were written `latency` BCs before it; its position, the event number and
// the monitoring flag are queued. The formatter takes queued events one at a
// time, reads the window of BCs from win_pre before to win_post after the
// triggering BC (each 0..2, as the system description allows) and writes a
// fragment into the read-out FIFO:
//   header  (snbr 0xE): {mon, bcid[11:0] of triggering BC, evid[18:0]}
//   sectors (snbr = sector 0..13): the 32-bit sector word, for each BC of
//           the window in time order; with zs_en, words with no candidate
//           are suppressed
//   trailer (snbr 0xF): {err[3:0], 0, number of sector words}
// err[0]: a window row was read less than 2*14 BCs before the pipeline
// would overwrite it (formatter far behind; the data may be at risk),
// err[1]: an L1A was lost because the queue was full.
// With mon_en the same words also go into the monitoring FIFO (read through
// the register bus); if it lacks room the copy of that event is skipped.
// busy rises when BUSY_Q L1As wait in the queue (early enough that the
// waiting events are formatted before the pipeline overwrites their rows
// at the default sizes) or when the read-out FIFO is close to full.
// Pipeline depth, queue and FIFO sizes and the word layouts are this
// design's choices.
//
// Timing: a fragment of n sector words takes n_bc*14 + n_bc + 3 cycles to
// build; a formatter output word at most every cycle.
module mioct_readout
  import muctpi_pkg::*;
#(
  parameter int PIPE_DEPTH = 256,
  parameter int L1AQ_DEPTH = 8,
  parameter int BUSY_Q     = 3,
  parameter int RO_DEPTH   = 1024,
  parameter int MON_DEPTH  = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_SECTOR-1:0][SECT_W-1:0] sectors,
  input  logic [BCID_W-1:0]         bcid,       // BC number of `sectors`
  input  logic                      l1a,
  input  logic [EVID_W-1:0]         evid,
  input  logic                      mon_flag,   // monitoring signal with the L1A
  input  logic [7:0]                latency,
  input  logic [1:0]                win_pre,
  input  logic [1:0]                win_post,
  input  logic                      zs_en,
  input  logic                      mon_en,
  // read-out FIFO, towards the token slave
  input  logic                      ro_rd,
  output bus_word_t                 ro_rdata,
  output logic                      ro_empty,
  output logic                      frag_done,
  // monitoring FIFO, towards the register bus
  input  logic                      mon_rd,
  output bus_word_t                 mon_rdata,
  output logic                      mon_empty,
  output logic [$clog2(MON_DEPTH):0] mon_count,
  output logic                      busy
);
  localparam int AW     = $clog2(PIPE_DEPTH);
  localparam int MAXW   = 2 + 5 * N_SECTOR;      // longest fragment
  localparam int ROW_W  = BCID_W + N_SECTOR * SECT_W;

  typedef struct packed {
    logic [15:0]       first_abs;
    logic [2:0]        nbc;
    logic [1:0]        trig_off;
    logic [EVID_W-1:0] evid;
    logic              mon;
  } l1a_ent_t;

  typedef enum logic [2:0] {IDLE, RD_TRIG, HDR, RD_ROW, SECT, TRL} st_t;

  // ---------------- pipeline ----------------
  logic [ROW_W-1:0] pipe [PIPE_DEPTH];
  logic [15:0]      abs_wp;                      // free-running row counter
  logic [15:0]      rd_abs;
  logic [ROW_W-1:0] row_q;

  always_ff @(posedge clk) begin
    pipe[abs_wp[AW-1:0]] <= {bcid, sectors};
    row_q <= pipe[rd_abs[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) abs_wp <= '0;
    else        abs_wp <= abs_wp + 1'b1;

  // ---------------- L1A queue ----------------
  l1a_ent_t q_in, q_out;
  logic q_empty, q_full, q_rd;
  logic [$clog2(L1AQ_DEPTH):0] q_count;
  logic lost;

  always_comb begin
    q_in.first_abs = abs_wp - 16'd1 - 16'(latency) - 16'(win_pre);
    q_in.nbc       = 3'(win_pre) + 3'(win_post) + 3'd1;
    q_in.trig_off  = win_pre;
    q_in.evid      = evid;
    q_in.mon       = mon_flag;
  end

  sync_fifo #(.WIDTH($bits(l1a_ent_t)), .DEPTH(L1AQ_DEPTH)) u_l1aq (
    .clk, .rst_n, .wr(l1a), .wdata(q_in), .rd(q_rd), .rdata(q_out),
    .empty(q_empty), .full(q_full), .count(q_count));

  // ---------------- formatter ----------------
  st_t         st;
  l1a_ent_t    ev;
  logic [2:0]  bc_i;
  logic [3:0]  s_i;
  logic [11:0] nw;
  logic        ovr, mon_copy;
  logic [$clog2(RO_DEPTH):0] ro_count;
  logic        ro_wr;
  bus_word_t   ro_wdata;
  logic        ro_full, mon_full;
  sector_word_t cur;
  logic [15:0] age;

  assign q_rd = (st == IDLE) && !q_empty && (ro_count <= ($clog2(RO_DEPTH)+1)'(RO_DEPTH - MAXW));
  assign cur  = sector_word_t'(row_q[s_i*SECT_W +: SECT_W]);
  assign age  = abs_wp - rd_abs;

  always_comb begin
    ro_wr    = 1'b0;
    ro_wdata = '0;
    case (st)
      HDR: begin
        ro_wr    = 1'b1;
        ro_wdata = '{snbr: SNBR_HEADER,
                     data: frag_header(ev.evid, row_q[ROW_W-1 -: BCID_W], ev.mon)};
      end
      SECT: if (!(zs_en && cur.c0.pt == 0 && cur.c1.pt == 0)) begin
        ro_wr    = 1'b1;
        ro_wdata = '{snbr: SNBR_W'(s_i), data: SECT_W'(cur)};
      end
      TRL: begin
        ro_wr    = 1'b1;
        ro_wdata = '{snbr: SNBR_TRAILER, data: frag_trailer({2'b00, lost, ovr}, nw)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= IDLE; ev <= '0; bc_i <= '0; s_i <= '0; nw <= '0;
      ovr <= 1'b0; mon_copy <= 1'b0; rd_abs <= '0; lost <= 1'b0; frag_done <= 1'b0;
    end else begin
      frag_done <= 1'b0;
      if (l1a && q_full) lost <= 1'b1;
      case (st)
        IDLE: if (q_rd) begin
          ev       <= q_out;
          rd_abs   <= q_out.first_abs + 16'(q_out.trig_off);
          ovr      <= 1'b0;
          nw       <= '0;
          mon_copy <= mon_en && (mon_count <= ($clog2(MON_DEPTH)+1)'(MON_DEPTH - MAXW));
          st       <= RD_TRIG;
        end
        RD_TRIG: st <= HDR;
        HDR: begin
          rd_abs <= ev.first_abs;
          bc_i   <= '0;
          st     <= RD_ROW;
        end
        RD_ROW: begin
          if (age >= 16'(PIPE_DEPTH - 2*N_SECTOR)) ovr <= 1'b1;
          s_i <= '0;
          st  <= SECT;
        end
        SECT: begin
          if (ro_wr) nw <= nw + 1'b1;
          s_i <= s_i + 1'b1;
          if (s_i == 4'(N_SECTOR-1)) begin
            bc_i   <= bc_i + 1'b1;
            rd_abs <= rd_abs + 1'b1;
            st     <= (bc_i == ev.nbc - 3'd1) ? TRL : RD_ROW;
          end
        end
        TRL: begin
          frag_done <= 1'b1;
          if (!(l1a && q_full)) lost <= 1'b0;
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end

  sync_fifo #(.WIDTH($bits(bus_word_t)), .DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst_n, .wr(ro_wr), .wdata(ro_wdata), .rd(ro_rd), .rdata(ro_rdata),
    .empty(ro_empty), .full(ro_full), .count(ro_count));

  sync_fifo #(.WIDTH($bits(bus_word_t)), .DEPTH(MON_DEPTH)) u_mon (
    .clk, .rst_n, .wr(ro_wr && mon_copy), .wdata(ro_wdata), .rd(mon_rd), .rdata(mon_rdata),
    .empty(mon_empty), .full(mon_full), .count(mon_count));

  assign busy = (q_count >= ($clog2(L1AQ_DEPTH)+1)'(BUSY_Q)) ||
                (ro_count > ($clog2(RO_DEPTH)+1)'(RO_DEPTH - 2*MAXW));

  // A full read-out FIFO cannot occur: an event starts only with room for
  // the longest fragment.
  a_no_ro_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(ro_wr && ro_full));
endmodule
