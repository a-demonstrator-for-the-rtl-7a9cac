// mioct_sector_input: receive path of one sector in an octant module.
//
// The sector logic sends one 32-bit word per bunch crossing (BC). The word
// is sampled either on the rising or on the falling edge of the BC clock
// (edge_sel, programmable per sector as the system description asks), then
// optionally replaced by the content of a test memory that plays back
// stored words instead of the external data (test_en), and finally delayed
// by a programmable number of BCs so that all sectors line up (delay,
// 0..MAX_DELAY-1; at least 10 BCs of skew must be absorbed). The test
// memory is written through the register bus and read at the address
// tm_raddr, the play-back counter of the octant module.
//
// Timing: out is registered. A word sampled on rising clock edge n is on
// out after edge n + 1 + delay; a word sampled on the falling edge half a
// cycle before edge n appears at the same time. Test-memory word tm_raddr
// presented at edge n likewise appears after edge n + 1 + delay. The
// memory depth and the read latency are this design's choice.
module mioct_sector_input
  import muctpi_pkg::*;
#(
  parameter int MAX_DELAY = 16,
  parameter int TM_DEPTH  = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [SECT_W-1:0]             sector_in,
  input  logic                          edge_sel,   // 0 rising, 1 falling
  input  logic [$clog2(MAX_DELAY)-1:0]  delay,
  input  logic                          test_en,
  input  logic                          tm_we,
  input  logic [$clog2(TM_DEPTH)-1:0]   tm_waddr,
  input  logic [SECT_W-1:0]             tm_wdata,
  input  logic [$clog2(TM_DEPTH)-1:0]   tm_raddr,
  output logic [SECT_W-1:0]             out
);
  logic [SECT_W-1:0] neg_q, cap_q, tm_q, src;
  logic [SECT_W-1:0] tmem [TM_DEPTH];
  logic [SECT_W-1:0] dl [MAX_DELAY];

  // falling-edge capture, retimed into the rising-edge domain below
  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) neg_q <= '0;
    else        neg_q <= sector_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cap_q <= '0;
    else        cap_q <= edge_sel ? neg_q : sector_in;

  // test memory, synchronous read
  always_ff @(posedge clk) begin
    if (tm_we) tmem[tm_waddr] <= tm_wdata;
    tm_q <= tmem[tm_raddr];
  end

  assign src = test_en ? tm_q : cap_q;

  // programmable alignment delay
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) dl[i] <= '0;
      out <= '0;
    end else begin
      dl[0] <= src;
      for (int i = 1; i < MAX_DELAY; i++) dl[i] <= dl[i-1];
      out <= (delay == 0) ? src : dl[delay - 1'b1];
    end
endmodule
