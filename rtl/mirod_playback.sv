// mirod_playback: play-back memory of the read-out driver. It holds a
// recorded or hand-made sequence of transfer-bus cycles and replays it, one
// entry per clock, in place of the MIBAK backplane, so the read-out driver
// can be tested without any octant or CTP interface module.
//
// Entry = {berr, tk_back, dvld, ready, bus[35:0]} (40 bits), written through
// we/waddr/wdata. A start pulse replays entries 0 .. length-1; outside a
// replay all outputs are low. The replay does not react to the token: the
// entries must hold the token return and the data at the cycles a real
// backplane would give them.
//
// Timing: with start sampled at edge n, entry k is on the outputs after
// edge n + 1 + k (the synchronous memory read); active is high from edge n
// until two edges after the last entry was put out.
// The document gives play-back memories for the MIBAK data and control
// signals; the single memory, entry layout and start control are this
// design's choices.
module mirod_playback
  import muctpi_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [39:0] wdata,
  input  logic       start,
  input  logic [$clog2(DEPTH):0] length,
  output logic       active,
  output logic       ready,
  output logic       dvld,
  output logic       berr,
  output logic       tk_back,
  output bus_word_t  bus
);
  localparam int AW = $clog2(DEPTH);

  logic [39:0]   mem [DEPTH];
  logic [39:0]   q;
  logic [AW:0]   rp;
  logic          rd_en, show;

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  always_ff @(posedge clk) if (rd_en) q <= mem[rp[AW-1:0]];

  assign rd_en = active && rp < length;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0; rp <= '0; show <= 1'b0;
    end else begin
      show <= rd_en;
      if (start && !active) begin
        active <= (length != 0);
        rp     <= '0;
      end else if (active) begin
        if (rd_en) rp <= rp + 1'b1;
        else if (!show) active <= 1'b0;   // last entry shown
      end
    end

  assign {berr, tk_back, dvld, ready} = show ? q[39:36] : 4'b0;
  assign bus = show ? bus_word_t'(q[35:0]) : '0;
endmodule
