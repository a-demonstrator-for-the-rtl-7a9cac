// mirod_extract: event extraction in the read-out driver.
//
// Bus words collected by the token master are buffered in a word FIFO (the
// transfer runs at one word per BC, extraction spends two cycles on each
// sector word). From the CTP-interface fragment (source 0) it takes the
// general event information: event number, BC number, monitoring flag and
// the total multiplicity. From each octant fragment it takes every
// muon-track candidate of every sector word:
//   * a candidate is kept when its pT index is non-zero and at least the
//     programmable threshold for its position (thr0 for the first, thr1 for
//     the second candidate of a sector);
//   * the sector is renamed through a programmable map (16 x 14 entries of
//     8 bits, default {octant, sector}) to a geometrical identifier;
//   * it is marked in_trig when its BC bits equal those of the octant
//     fragment header (the triggering BC).
// Kept candidates go into the candidate FIFO; when the token master closes
// the event, a header record with the event information, error flags
// (token-master flags, plus bit 0 when any trailer reports an error) and
// the candidate count goes into the header FIFO.
// space_ok tells the token master that the FIFOs can take one more event
// of the largest possible size. FIFO sizes are this design's choices.
module mirod_extract
  import muctpi_pkg::*;
#(
  parameter int WORD_DEPTH = 2048,
  parameter int CAND_DEPTH = 4096,
  parameter int HDR_DEPTH  = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       w_valid,
  input  bus_word_t  w,
  input  logic [4:0] w_src,
  input  logic       ev_end,
  input  logic [3:0] ev_err,
  output logic       space_ok,
  input  logic [2:0] thr0,
  input  logic [2:0] thr1,
  input  logic       map_we,
  input  logic [7:0] map_addr,
  input  logic [7:0] map_wdata,
  output logic [7:0] map_rdata,
  input  logic       hdr_rd,
  output ev_hdr_t    hdr_rdata,
  output logic       hdr_empty,
  input  logic       cand_rd,
  output rod_cand_t  cand_rdata,
  output logic       cand_empty
);
  localparam int N_MAP     = N_MIOCT * N_SECTOR;
  localparam int MAX_WORDS = 3 + N_MIOCT * (2 + 5 * N_SECTOR);
  localparam int MAX_CAND  = N_MIOCT * 5 * N_SECTOR * 2;

  typedef struct packed {
    logic       is_end;
    logic [3:0] err;
    logic [4:0] src;
    bus_word_t  w;
  } went_t;

  went_t wf_in, e;
  logic  wf_rd, wf_empty, wf_full;
  logic [$clog2(WORD_DEPTH):0] wf_count;

  assign wf_in = ev_end ? '{is_end: 1'b1, err: ev_err, src: '0, w: '0}
                        : '{is_end: 1'b0, err: '0, src: w_src, w: w};

  sync_fifo #(.WIDTH($bits(went_t)), .DEPTH(WORD_DEPTH)) u_wf (
    .clk, .rst_n, .wr(w_valid || ev_end), .wdata(wf_in), .rd(wf_rd), .rdata(e),
    .empty(wf_empty), .full(wf_full), .count(wf_count));

  // sector map
  logic [7:0] smap [N_MAP];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < N_MAP; i++) smap[i] <= 8'({4'(i / N_SECTOR), 4'(i % N_SECTOR)});
    end else if (map_we && int'(map_addr) < N_MAP) smap[map_addr] <= map_wdata;
  assign map_rdata = (int'(map_addr) < N_MAP) ? smap[map_addr] : 8'h00;

  // extraction
  ev_hdr_t      cur;
  logic [2:0]   trig_bc;
  logic         j;
  logic         hdr_wr, cand_wr;
  rod_cand_t    cand_w;
  sector_word_t sw;
  cand_t        c;
  logic         is_sect;
  logic [7:0]   map_ix;
  logic         trl_err;
  logic         hdr_full, cand_full;
  logic [$clog2(HDR_DEPTH):0]  hdr_count;
  logic [$clog2(CAND_DEPTH):0] cand_count;

  assign sw      = sector_word_t'(e.w.data);
  assign c       = j ? sw.c1 : sw.c0;
  assign is_sect = !e.is_end && e.src != 0 && e.w.snbr < SNBR_W'(N_SECTOR);
  assign map_ix  = 8'((int'(e.src) - 1) * N_SECTOR + int'(e.w.snbr));

  always_comb begin
    cand_w.sector_id = smap[map_ix];
    cand_w.pt        = c.pt;
    cand_w.roi       = c.roi;
    cand_w.ovl       = c.ovl;
    cand_w.cidx      = j;
    cand_w.in_trig   = (sw.bcid == trig_bc);
    cand_w.bc        = sw.bcid;
    cand_wr = !wf_empty && is_sect && c.pt != 0 && c.pt >= (j ? thr1 : thr0);
    hdr_wr  = !wf_empty && e.is_end;
    wf_rd   = !wf_empty && (!is_sect || j);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur <= '0; trig_bc <= '0; j <= 1'b0; trl_err <= 1'b0;
    end else if (!wf_empty) begin
      if (e.is_end) begin
        cur     <= '0;
        trl_err <= 1'b0;
      end else if (is_sect) begin
        j <= !j;
        if (cand_wr) cur.ncand <= cur.ncand + 1'b1;
      end else if (e.w.snbr == SNBR_HEADER) begin
        if (e.src == 0) begin
          cur.evid <= e.w.data[18:0];
          cur.bcid <= e.w.data[30:19];
          cur.mon  <= e.w.data[31];
        end else
          trig_bc  <= e.w.data[21:19];
      end else if (e.w.snbr == SNBR_TRAILER) begin
        if (e.w.data[31:28] != 0) trl_err <= 1'b1;
      end else if (e.src == 0 && e.w.snbr == '0) begin
        cur.mult <= e.w.data[17:0];
      end
    end

  ev_hdr_t hdr_w;
  always_comb begin
    hdr_w     = cur;
    hdr_w.err = e.err | {3'b000, trl_err};
  end

  sync_fifo #(.WIDTH($bits(ev_hdr_t)), .DEPTH(HDR_DEPTH)) u_hf (
    .clk, .rst_n, .wr(hdr_wr), .wdata(hdr_w), .rd(hdr_rd), .rdata(hdr_rdata),
    .empty(hdr_empty), .full(hdr_full), .count(hdr_count));

  sync_fifo #(.WIDTH($bits(rod_cand_t)), .DEPTH(CAND_DEPTH)) u_cf (
    .clk, .rst_n, .wr(cand_wr), .wdata(cand_w), .rd(cand_rd), .rdata(cand_rdata),
    .empty(cand_empty), .full(cand_full), .count(cand_count));

  assign space_ok = (int'(wf_count)   <= WORD_DEPTH - MAX_WORDS) &&
                    (int'(cand_count) <= CAND_DEPTH - MAX_CAND) &&
                    (int'(hdr_count)  <= HDR_DEPTH - 2);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !((cand_wr && cand_full) || (hdr_wr && hdr_full) || ((w_valid || ev_end) && wf_full)));
endmodule
