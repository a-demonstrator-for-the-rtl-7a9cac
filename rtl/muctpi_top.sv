// muctpi_top: the complete muon-to-CTP interface.
//
// Sixteen octant modules (mioct) each take the 14 sector words of one
// octant in phi and one half in eta, every bunch crossing. Their
// overlap-corrected multiplicities for six pT thresholds are summed on the
// backplane (mibak) and sent, latched, by the CTP interface module (mictp)
// to the Central Trigger Processor. The CTP's fast signals (BCR, ECR, L1A,
// monitoring and test signals) enter through mictp and are broadcast to every module;
// the modules' BUSY lines are ORed and returned to the CTP. For each L1A
// every module builds an event fragment; when all are ready the read-out
// driver (mirod) collects them with a token passed along the backplane and
// sends Level-2 RoI data and data-acquisition data over two S-Link source
// interfaces, with selected events kept in a monitoring FIFO.
//
// Register bus: cfg_addr[20:16] selects the module (0..15 octant modules,
// 16 CTP interface, 17 read-out driver), cfg_addr[15:0] is the module's
// own word address (see each module). Reads are combinational.
//
// Timing: a sector word sampled on rising clock edge n is counted in
// ctp_mult after edge n + 4 + its alignment delay (sector input 1 + delay,
// overlap and count 1, backplane sum 1, CTP latch 1); the limit the
// system must meet is 8 BCs (200 ns).
module muctpi_top
  import muctpi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [N_MIOCT-1:0][N_SECTOR-1:0][SECT_W-1:0] sector_in,
  // CTP
  input  logic        ctp_bcr,
  input  logic        ctp_ecr,
  input  logic        ctp_l1a,
  input  logic        ctp_mon,
  input  logic        ctp_test,
  output mult_t       ctp_mult,
  output logic        ctp_busy,
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
  input  logic [20:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata
);
  logic bcr, ecr, l1a, mon, test;
  mult_t oct_mult [N_MIOCT];
  mult_t total_mult;
  logic [N_SLAVE-1:0] slv_tk_in, slv_tk_out, slv_ready, slv_dvld, slv_berr;
  bus_word_t          slv_bus [N_SLAVE];
  logic [N_MIOCT+1:0] busy_in;
  logic               tk_rod, tk_back, bk_ready, bk_dvld, bk_berr, bk_busy;
  bus_word_t          bk_bus;
  logic [31:0]        oct_rdata [N_MIOCT];
  logic [31:0]        ctp_rdata, rod_rdata;
  logic [4:0]         sel;

  assign sel = cfg_addr[20:16];

  for (genvar i = 0; i < N_MIOCT; i++) begin : g_oct
    mioct u_oct (
      .clk, .rst_n,
      .sector_in (sector_in[i]),
      .bcr, .ecr, .l1a, .mon_sig (mon), .test_sig (test),
      .mult      (oct_mult[i]),
      .tk_in     (slv_tk_in[i+1]),
      .tk_out    (slv_tk_out[i+1]),
      .ready     (slv_ready[i+1]),
      .dvld      (slv_dvld[i+1]),
      .bus       (slv_bus[i+1]),
      .berr      (slv_berr[i+1]),
      .busy      (busy_in[i+2]),
      .cfg_we    (cfg_we && sel == 5'(i)),
      .cfg_re    (cfg_re && sel == 5'(i)),
      .cfg_addr  (cfg_addr[15:0]),
      .cfg_wdata,
      .cfg_rdata (oct_rdata[i]));
  end

  mictp u_ctp (
    .clk, .rst_n,
    .ctp_bcr, .ctp_ecr, .ctp_l1a, .ctp_mon, .ctp_test, .ctp_mult, .ctp_busy,
    .bak_mult (total_mult),
    .bak_bcr (bcr), .bak_ecr (ecr), .bak_l1a (l1a), .bak_mon (mon), .bak_test (test),
    .bak_busy (bk_busy),
    .busy     (busy_in[1]),
    .tk_in    (slv_tk_in[0]),
    .tk_out   (slv_tk_out[0]),
    .ready    (slv_ready[0]),
    .dvld     (slv_dvld[0]),
    .bus      (slv_bus[0]),
    .berr     (slv_berr[0]),
    .cfg_we   (cfg_we && sel == 5'd16),
    .cfg_addr (cfg_addr[15:0]),
    .cfg_wdata,
    .cfg_rdata (ctp_rdata));

  mibak u_bak (
    .clk, .rst_n,
    .oct_mult, .total_mult,
    .tk_from_rod (tk_rod), .tk_to_rod (tk_back),
    .slv_tk_out, .slv_tk_in, .slv_ready, .slv_dvld, .slv_bus, .slv_berr,
    .ready (bk_ready), .dvld (bk_dvld), .bus (bk_bus), .berr (bk_berr),
    .busy_in, .busy (bk_busy));

  mirod u_rod (
    .clk, .rst_n,
    .ready (bk_ready), .dvld (bk_dvld), .bus (bk_bus), .berr (bk_berr),
    .tk_back, .tk_out (tk_rod), .busy (busy_in[0]),
    .l2_ud, .l2_uctrl, .l2_uwen, .l2_lff,
    .daq_ud, .daq_uctrl, .daq_uwen, .daq_lff, .irq,
    .cfg_we   (cfg_we && sel == 5'd17),
    .cfg_re   (cfg_re && sel == 5'd17),
    .cfg_addr (cfg_addr[15:0]),
    .cfg_wdata,
    .cfg_rdata (rod_rdata));

  always_comb begin
    cfg_rdata = '0;
    if (sel < 5'(N_MIOCT)) cfg_rdata = oct_rdata[sel[3:0]];
    else if (sel == 5'd16) cfg_rdata = ctp_rdata;
    else if (sel == 5'd17) cfg_rdata = rod_rdata;
  end
endmodule
