// sync_fifo: single-clock first-in first-out buffer used for the read-out,
// monitoring, candidate and header FIFOs. Memory array with read and write
// pointers one bit wider than the address. The head word is shown on rdata
// while empty is low (first-word fall-through); rd pops it, wr pushes wdata.
// A push when full or a pop when empty is ignored. count gives the occupancy
// for watermark, BUSY and READY decisions. Helper of this design.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16            // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_wr, do_rd;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (do_wr) mem[wp[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
endmodule
