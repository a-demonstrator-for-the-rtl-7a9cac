// mirod: read-out driver module. Collects the event fragments of the CTP
// interface and all octant modules over the MIBAK transfer bus and feeds
// three processing branches.
//
//   mirod_token_master -> mirod_extract -> distributor -+-> mirod_sorter ->
//        mirod_rod_formatter (Level-2 RoI S-Link)
//                                                       +-> mirod_rod_formatter
//        (data-acquisition S-Link, all candidates)
//                                                       +-> mirod_monitor
//        (monitoring FIFO, register bus, interrupt)
//
// A mirod_analyser records the MIBAK bus or either S-Link in real time for
// read-back through the register bus. A mirod_playback memory can stand in
// for the backplane: in play-back mode the token master and the analyser
// see its replayed bus and control lines instead of the inputs.
//
// The distributor hands every item (an event header, then its candidates)
// to all three branches in the same cycle, and only when all three can
// take it, so each branch sees the complete event.
//
// Register bus (word addresses; plain single-cycle bus standing in for
// VME, reading MONDAT pops the monitoring FIFO):
//   0x0000 CTRL  [4:0] monitoring criteria, [5] combine with AND,
//                [12:8] Level-2 candidate limit (1..16)
//   0x0001 THR   [2:0] pT threshold of first candidate, [6:4] of second
//   0x0002 NTH   every n-th event     0x0003 BCSEL  BC number to select
//   0x0004 EVSEL event number to select  0x0005 WMARK monitoring watermark
//   0x0006 SRCID source identifier    0x0007 RUN    run number
//   0x0008 MONDAT monitoring FIFO head word (read, pops)
//   0x0009 MONSTAT [15:0] FIFO count, [16] empty, [31:17] events dropped
//   0x000A ANACTRL [0] analyser enable (a rising edge restarts it),
//                [2:1] source: 0 MIBAK bus, 1 Level-2 S-Link, 2 DAQ S-Link
//   0x000B ANADAT0 analyser entry bits 31:0 (read)
//   0x000C ANADAT1 analyser entry bits 59:32 {stamp, ctrl, data[35:32]}
//                (read, pops)
//   0x000D ANASTAT [15:0] analyser count, [16] empty
//   0x000E PBCTRL  [0] take the transfer bus from the play-back memory,
//                [1] start a replay with the length written alongside
//                (write 1; reads 1 while replaying),
//                [28:16] replay length
//   0x000F PBLO   low 32 bits of the next play-back entry
//   0x2000+a     play-back entry a = {cfg_wdata[7:0], PBLO} (write)
//   0x0100+i sector map entry i = 14*octant + sector
// Register map and reset values are this design's choices.
module mirod
  import muctpi_pkg::*;
#(
  parameter int L2_MAX    = 16,
  parameter int MON_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // transfer bus
  input  logic        ready,
  input  logic        dvld,
  input  bus_word_t   bus,
  input  logic        berr,
  input  logic        tk_back,
  output logic        tk_out,
  output logic        busy,
  // Level-2 S-Link
  output logic [31:0] l2_ud,
  output logic        l2_uctrl,
  output logic        l2_uwen,
  input  logic        l2_lff,
  // data-acquisition S-Link
  output logic [31:0] daq_ud,
  output logic        daq_uctrl,
  output logic        daq_uwen,
  input  logic        daq_lff,
  output logic        irq,
  // register bus
  input  logic        cfg_we,
  input  logic        cfg_re,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata
);
  localparam int LW = $clog2(L2_MAX) + 1;
  localparam int MW = $clog2(MON_DEPTH) + 1;

  logic [31:0] ctrl, thr, nth, bcsel, evsel, wmark, srcid, runno, anactrl, pbctrl, pblo;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctrl  <= 32'(L2_MAX) << 8;
      thr   <= '0; nth <= 32'd1; bcsel <= '0; evsel <= '0;
      wmark <= '0; srcid <= 32'h0076_0000; runno <= '0; anactrl <= '0;
      pbctrl <= '0; pblo <= '0;
    end else if (cfg_we) begin
      case (cfg_addr)
        16'h0000: ctrl  <= cfg_wdata;
        16'h0001: thr   <= cfg_wdata;
        16'h0002: nth   <= cfg_wdata;
        16'h0003: bcsel <= cfg_wdata;
        16'h0004: evsel <= cfg_wdata;
        16'h0005: wmark <= cfg_wdata;
        16'h0006: srcid <= cfg_wdata;
        16'h0007: runno <= cfg_wdata;
        16'h000A: anactrl <= cfg_wdata;
        16'h000E: pbctrl  <= cfg_wdata & 32'h1FFF_0001;
        16'h000F: pblo    <= cfg_wdata;
        default: ;
      endcase
    end

  // ---------------- collection and extraction ----------------
  logic       w_valid, ev_end, space_ok;
  bus_word_t  w;
  logic [4:0] w_src;
  logic [3:0] ev_err;

  // ---------------- backplane or play-back ----------------
  logic      pb_active, pb_ready, pb_dvld, pb_berr, pb_tk_back;
  bus_word_t pb_bus;
  logic      m_ready, m_dvld, m_berr, m_tk_back;
  bus_word_t m_bus;

  // a start uses the length written with it
  wire pb_start = cfg_we && cfg_addr == 16'h000E && cfg_wdata[1];
  mirod_playback #(.DEPTH(4096)) u_pb (
    .clk, .rst_n,
    .we (cfg_we && cfg_addr[15:12] == 4'h2), .waddr (cfg_addr[11:0]),
    .wdata ({cfg_wdata[7:0], pblo}),
    .start (pb_start), .length (pb_start ? cfg_wdata[28:16] : pbctrl[28:16]),
    .active (pb_active), .ready (pb_ready), .dvld (pb_dvld), .berr (pb_berr),
    .tk_back (pb_tk_back), .bus (pb_bus));

  always_comb
    if (pbctrl[0]) begin
      m_ready = pb_ready; m_dvld = pb_dvld; m_berr = pb_berr; m_tk_back = pb_tk_back; m_bus = pb_bus;
    end else begin
      m_ready = ready; m_dvld = dvld; m_berr = berr; m_tk_back = tk_back; m_bus = bus;
    end

  mirod_token_master u_tm (
    .clk, .rst_n, .ready (m_ready), .dvld (m_dvld), .bus (m_bus), .berr (m_berr),
    .tk_back (m_tk_back), .tk_out,
    .space_ok, .w_valid, .w, .w_src, .ev_end, .ev_err, .busy);

  logic      hdr_rd, hdr_empty, cand_rd, cand_empty;
  ev_hdr_t   hdr;
  rod_cand_t cand;
  logic [7:0] map_rdata;

  mirod_extract u_ex (
    .clk, .rst_n, .w_valid, .w, .w_src, .ev_end, .ev_err, .space_ok,
    .thr0 (thr[2:0]), .thr1 (thr[6:4]),
    .map_we (cfg_we && cfg_addr[15:8] == 8'h01), .map_addr (cfg_addr[7:0]),
    .map_wdata (cfg_wdata[7:0]), .map_rdata,
    .hdr_rd, .hdr_rdata (hdr), .hdr_empty,
    .cand_rd, .cand_rdata (cand), .cand_empty);

  // ---------------- distributor ----------------
  logic        in_cands, d_valid, fire;
  logic [11:0] left;
  ev_item_t    item;
  logic        rdy_l2, rdy_daq, rdy_mon;

  always_comb begin
    item = '0;
    if (in_cands) begin
      item.cand = cand;
      d_valid   = !cand_empty;
    end else begin
      item.is_hdr = 1'b1;
      item.hdr    = hdr;
      d_valid     = !hdr_empty;
    end
  end
  assign fire    = d_valid && rdy_l2 && rdy_daq && rdy_mon;
  assign hdr_rd  = fire && !in_cands;
  assign cand_rd = fire && in_cands;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_cands <= 1'b0; left <= '0;
    end else if (fire) begin
      if (!in_cands) begin
        left     <= hdr.ncand;
        in_cands <= (hdr.ncand != 0);
      end else begin
        left <= left - 1'b1;
        if (left == 12'd1) in_cands <= 1'b0;
      end
    end

  // ---------------- Level-2 branch ----------------
  logic     s_valid, s_ready;
  ev_item_t s_item;

  mirod_sorter #(.N_MAX(L2_MAX)) u_sort (
    .clk, .rst_n, .l2_max (LW'(ctrl[12:8])),
    .in_valid (fire), .in_ready (rdy_l2), .in_item (item),
    .out_valid (s_valid), .out_ready (s_ready), .out_item (s_item));

  mirod_rod_formatter u_l2 (
    .clk, .rst_n, .source_id (srcid), .run_no (runno),
    .in_valid (s_valid), .in_ready (s_ready), .in_item (s_item),
    .ud (l2_ud), .uctrl (l2_uctrl), .uwen (l2_uwen), .lff (l2_lff));

  // ---------------- data-acquisition branch ----------------
  mirod_rod_formatter u_daq (
    .clk, .rst_n, .source_id (srcid | 32'h1), .run_no (runno),
    .in_valid (fire), .in_ready (rdy_daq), .in_item (item),
    .ud (daq_ud), .uctrl (daq_uctrl), .uwen (daq_uwen), .lff (daq_lff));

  // ---------------- monitoring branch ----------------
  logic [31:0]   mon_rdata;
  logic          mon_empty;
  logic [MW-1:0] mon_count;
  logic [15:0]   dropped;

  mirod_monitor #(.MON_DEPTH(MON_DEPTH)) u_mon (
    .clk, .rst_n, .crit_en (ctrl[4:0]), .crit_and (ctrl[5]),
    .nth (nth[15:0]), .bcid_sel (bcsel[11:0]), .evid_sel (evsel[18:0]),
    .watermark (MW'(wmark)),
    .in_valid (fire), .in_ready (rdy_mon), .in_item (item),
    .mon_rd (cfg_re && cfg_addr == 16'h0008), .mon_rdata, .mon_empty, .mon_count,
    .irq, .dropped);

  // ---------------- analyser ----------------
  logic [59:0] ana_rdata;
  logic        ana_empty;
  logic [10:0] ana_count;

  mirod_analyser #(.DEPTH(1024)) u_ana (
    .clk, .rst_n, .enable (anactrl[0]), .src (anactrl[2:1]),
    .bak_ready (m_ready), .bak_tk_out (tk_out), .bak_tk_back (m_tk_back),
    .bak_dvld (m_dvld), .bak_berr (m_berr), .bak_bus (m_bus),
    .l2_ud, .l2_uctrl, .l2_uwen, .l2_lff,
    .daq_ud, .daq_uctrl, .daq_uwen, .daq_lff,
    .rd (cfg_re && cfg_addr == 16'h000C), .rdata (ana_rdata),
    .empty (ana_empty), .count (ana_count));

  always_comb begin
    cfg_rdata = '0;
    case (cfg_addr)
      16'h0000: cfg_rdata = ctrl;
      16'h0001: cfg_rdata = thr;
      16'h0002: cfg_rdata = nth;
      16'h0003: cfg_rdata = bcsel;
      16'h0004: cfg_rdata = evsel;
      16'h0005: cfg_rdata = wmark;
      16'h0006: cfg_rdata = srcid;
      16'h0007: cfg_rdata = runno;
      16'h0008: cfg_rdata = mon_rdata;
      16'h0009: cfg_rdata = {dropped[14:0], mon_empty, 16'(mon_count)};
      16'h000A: cfg_rdata = anactrl;
      16'h000B: cfg_rdata = ana_rdata[31:0];
      16'h000C: cfg_rdata = {4'h0, ana_rdata[59:32]};
      16'h000D: cfg_rdata = {15'h0, ana_empty, 5'h0, ana_count};
      16'h000E: cfg_rdata = pbctrl | {30'h0, pb_active, 1'b0};
      16'h000F: cfg_rdata = pblo;
      default: if (cfg_addr[15:8] == 8'h01) cfg_rdata = 32'(map_rdata);
    endcase
  end
endmodule
