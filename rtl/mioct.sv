// mioct: octant module. Receives the 14 sector words of one octant in phi
// and one half in eta, forms the overlap-corrected multiplicity for the six
// pT thresholds, keeps the sector data for read-out and delivers an event
// fragment over the MIBAK transfer bus for every Level-1 Accept.
//
// Inside: 14 x mioct_sector_input (edge select, test memory, alignment
// delay) -> mioct_overlap_sum (BCID check, overlap, saturating count) ->
// mult to the backplane; the same aligned words -> mioct_readout (pipeline,
// window, zero suppression, read-out and monitoring FIFO) ->
// mibak_token_slave. The BC and event counters follow BCR, ECR and L1A from
// the backplane. The test signal from the backplane restarts the test
// memories: the BC after it plays word 0, then word 1, and so on, wrapping
// after TM_DEPTH words, so that all sectors and all modules play back in
// step.
//
// Register bus (a plain single-cycle bus standing in for VME; writes take
// effect on the next cycle, reads are combinational, and reading MONSTAT
// pops the monitoring FIFO). Word addresses:
//   0x0000 CTRL   [0] zs_en [1] mon_en [2] bcid_chk_en [3] bb_en [4] be_en
//                 [9:8] win_pre [11:10] win_post [23:16] l1a latency
//   0x0001 EDGE   [13:0] 1 = sample sector on falling edge
//   0x0002 TEST   [13:0] 1 = sector takes test-memory data
//   0x0003 BCOFS  [11:0] BCs between the BC counter and the aligned data
//   0x0004 BEMAP  [23:0] barrel/end-cap neighbourhood (4 x 6 bits)
//   0x0005 MONDAT [31:0] head word of monitoring FIFO (read)
//   0x0006 MONSTAT[3:0] snbr of head word, [4] empty, [25:16] count (read, pops)
//   0x0007 BCERR  count of BCID mismatches (read)
//   0x0010+s DELAY[3:0] of sector s
//   0x8000 | s<<8 | w: test memory word w of sector s (write)
//
// Timing: a sector word sampled on rising edge n is in mult after edge
// n + 2 + delay.
// Register map, reset values and BCID offset handling are this design's
// choices.
module mioct
  import muctpi_pkg::*;
#(
  parameter int MAX_DELAY  = 16,
  parameter int TM_DEPTH   = 256,
  parameter int PIPE_DEPTH = 256,
  parameter int RO_DEPTH   = 1024,
  parameter int MON_DEPTH  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N_SECTOR-1:0][SECT_W-1:0] sector_in,
  // fast signals from the backplane
  input  logic        bcr,
  input  logic        ecr,
  input  logic        l1a,
  input  logic        mon_sig,
  input  logic        test_sig,
  // multiplicity to the backplane summation
  output mult_t       mult,
  // transfer bus
  input  logic        tk_in,
  output logic        tk_out,
  output logic        ready,
  output logic        dvld,
  output bus_word_t   bus,
  output logic        berr,
  output logic        busy,
  // register bus
  input  logic        cfg_we,
  input  logic        cfg_re,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata
);
  localparam int DW = $clog2(MAX_DELAY);

  logic [31:0]          ctrl;
  logic [N_SECTOR-1:0]  edge_sel, test_en;
  logic [BCID_W-1:0]    bcofs;
  logic [3:0][5:0]      be_map;
  logic [DW-1:0]        delay [N_SECTOR];
  logic [15:0]          bcerr_cnt;
  logic [$clog2(TM_DEPTH)-1:0] tm_ptr;

  logic [BCID_W-1:0]    bcid, bcid_al;
  logic [EVID_W-1:0]    evid;
  logic [N_SECTOR-1:0][SECT_W-1:0] aligned;
  logic                 bcid_err;

  ttc_counters u_cnt (.clk, .rst_n, .bcr, .ecr, .l1a, .bcid, .evid);

  // BC number of the aligned sector data
  assign bcid_al = (bcid >= bcofs) ? bcid - bcofs : bcid + BCID_W'(BC_PER_ORBIT) - bcofs;

  // test memory play-back address, restarted by the test signal
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        tm_ptr <= '0;
    else if (test_sig) tm_ptr <= '0;
    else               tm_ptr <= tm_ptr + 1'b1;

  for (genvar s = 0; s < N_SECTOR; s++) begin : g_sec
    mioct_sector_input #(.MAX_DELAY(MAX_DELAY), .TM_DEPTH(TM_DEPTH)) u_in (
      .clk, .rst_n,
      .sector_in (sector_in[s]),
      .edge_sel  (edge_sel[s]),
      .delay     (delay[s]),
      .test_en   (test_en[s]),
      .tm_we     (cfg_we && cfg_addr[15] && cfg_addr[11:8] == 4'(s)),
      .tm_waddr  ($clog2(TM_DEPTH)'(cfg_addr[7:0])),
      .tm_wdata  (cfg_wdata),
      .tm_raddr  (tm_ptr),
      .out       (aligned[s]));
  end

  mioct_overlap_sum u_sum (
    .clk, .rst_n,
    .sectors     (aligned),
    .bcid_exp    (bcid_al[2:0]),
    .bcid_chk_en (ctrl[2]),
    .bb_en       (ctrl[3]),
    .be_en       (ctrl[4]),
    .be_map,
    .mult,
    .bcid_err);

  logic      ro_rd, ro_empty, frag_done, mon_rd, mon_empty;
  bus_word_t ro_rdata, mon_rdata;
  logic [$clog2(MON_DEPTH):0] mon_count;

  mioct_readout #(.PIPE_DEPTH(PIPE_DEPTH), .RO_DEPTH(RO_DEPTH), .MON_DEPTH(MON_DEPTH)) u_ro (
    .clk, .rst_n,
    .sectors  (aligned),
    .bcid     (bcid_al),
    .l1a, .evid,
    .mon_flag (mon_sig),
    .latency  (ctrl[23:16]),
    .win_pre  (ctrl[9:8]),
    .win_post (ctrl[11:10]),
    .zs_en    (ctrl[0]),
    .mon_en   (ctrl[1]),
    .ro_rd, .ro_rdata, .ro_empty, .frag_done,
    .mon_rd, .mon_rdata, .mon_empty, .mon_count,
    .busy);

  mibak_token_slave u_tok (
    .clk, .rst_n, .frag_done,
    .fifo_empty (ro_empty), .fifo_rdata (ro_rdata), .fifo_rd (ro_rd),
    .tk_in, .tk_out, .ready, .dvld, .bus, .berr);

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctrl     <= 32'h0000_001C;            // checks and overlap on, window 0
      edge_sel <= '0;
      test_en  <= '0;
      bcofs    <= '0;
      be_map   <= BE_MAP_DEFAULT;
      for (int s = 0; s < N_SECTOR; s++) delay[s] <= '0;
      bcerr_cnt <= '0;
    end else begin
      if (bcid_err) bcerr_cnt <= bcerr_cnt + 1'b1;
      if (cfg_we && !cfg_addr[15]) begin
        case (cfg_addr)
          16'h0000: ctrl     <= cfg_wdata;
          16'h0001: edge_sel <= cfg_wdata[N_SECTOR-1:0];
          16'h0002: test_en  <= cfg_wdata[N_SECTOR-1:0];
          16'h0003: bcofs    <= cfg_wdata[BCID_W-1:0];
          16'h0004: be_map   <= cfg_wdata[23:0];
          default:
            if (cfg_addr[15:4] == 12'h001 && cfg_addr[3:0] < 4'(N_SECTOR))
              delay[cfg_addr[3:0]] <= cfg_wdata[DW-1:0];
        endcase
      end
    end

  assign mon_rd = cfg_re && cfg_addr == 16'h0006;

  always_comb begin
    cfg_rdata = '0;
    case (cfg_addr)
      16'h0000: cfg_rdata = ctrl;
      16'h0001: cfg_rdata = 32'(edge_sel);
      16'h0002: cfg_rdata = 32'(test_en);
      16'h0003: cfg_rdata = 32'(bcofs);
      16'h0004: cfg_rdata = 32'(be_map);
      16'h0005: cfg_rdata = mon_rdata.data;
      16'h0006: cfg_rdata = {6'h0, 10'(mon_count), 11'h0, mon_empty, mon_rdata.snbr};
      16'h0007: cfg_rdata = 32'(bcerr_cnt);
      default:
        if (cfg_addr[15:4] == 12'h001 && cfg_addr[3:0] < 4'(N_SECTOR))
          cfg_rdata = 32'(delay[cfg_addr[3:0]]);
    endcase
  end
endmodule
