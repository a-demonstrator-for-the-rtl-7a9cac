// mirod_analyser: signal analyser of the read-out driver. While enabled it
// records, in real time, the signals of one selected source into a FIFO
// that is read back over the register bus, so that the waveforms of a
// transfer can be reconstructed afterwards:
//   src 0  MIBAK transfer bus: ctrl = {berr, dvld, tk_back, tk_out, ready},
//          data = 36-bit bus word
//   src 1  Level-2 S-Link, src 2  data-acquisition S-Link:
//          ctrl = {lff, uwen, uctrl}, data = {4'b0, ud}
// A sample is stored in every cycle in which any control line of the
// source is active, together with a 16-bit time stamp (clock cycles since
// the analyser was enabled), so idle stretches cost no memory. Nothing is
// stored while the FIFO is full, so capture is disabled before reading back
// to keep one unbroken record; clearing and setting `enable` restarts it
// with an empty FIFO and the time stamp at 0.
//
// Interface: entry = {stamp[15:0], ctrl[7:0], data[35:0]} (60 bits) on
// rdata while !empty; rd pops. Timing: the signals present before clock edge
// n are stored at edge n with the stamp n - (edge that enabled capture) - 1.
// The document describes a MIBAK analyser mode and an S-Link analyser FIFO
// read out over VME; merging both into one FIFO with a source select, the
// activity filter and the time stamp are this design's choices.
module mirod_analyser
  import muctpi_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [1:0] src,
  // MIBAK transfer bus as seen by the read-out driver
  input  logic       bak_ready,
  input  logic       bak_tk_out,
  input  logic       bak_tk_back,
  input  logic       bak_dvld,
  input  logic       bak_berr,
  input  bus_word_t  bak_bus,
  // the two S-Link source interfaces
  input  logic [31:0] l2_ud,
  input  logic       l2_uctrl,
  input  logic       l2_uwen,
  input  logic       l2_lff,
  input  logic [31:0] daq_ud,
  input  logic       daq_uctrl,
  input  logic       daq_uwen,
  input  logic       daq_lff,
  // read-back
  input  logic       rd,
  output logic [59:0] rdata,
  output logic       empty,
  output logic [$clog2(DEPTH):0] count
);
  logic [7:0]  ctrl;
  logic [35:0] data;
  logic [15:0] stamp;
  logic        en_q, full, clr;

  always_comb
    case (src)
      2'd0:    begin ctrl = {3'b0, bak_berr, bak_dvld, bak_tk_back, bak_tk_out, bak_ready}; data = bak_bus; end
      2'd1:    begin ctrl = {5'b0, l2_lff, l2_uwen, l2_uctrl};   data = {4'b0, l2_ud};  end
      2'd2:    begin ctrl = {5'b0, daq_lff, daq_uwen, daq_uctrl}; data = {4'b0, daq_ud}; end
      default: begin ctrl = '0; data = '0; end
    endcase

  // a rising enable empties the FIFO and restarts the time stamp
  assign clr = enable && !en_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      en_q <= 1'b0; stamp <= '0;
    end else begin
      en_q  <= enable;
      stamp <= clr ? '0 : stamp + 1'b1;
    end

  logic [$clog2(DEPTH)-1:0] wp, rp;
  logic [$clog2(DEPTH):0]   n;
  logic [59:0]              mem [DEPTH];
  logic                     wr, pop;

  assign full  = (n == ($clog2(DEPTH)+1)'(DEPTH));
  assign wr    = en_q && !clr && !full && (ctrl != 0);
  assign pop   = rd && n != 0;
  assign empty = (n == 0);
  assign count = n;
  assign rdata = mem[rp];

  always_ff @(posedge clk) if (wr) mem[wp] <= {stamp, ctrl, data};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; n <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0; n <= '0;
    end else begin
      if (wr)  wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
      n <= n + ($clog2(DEPTH)+1)'(wr) - ($clog2(DEPTH)+1)'(pop);
    end
endmodule
