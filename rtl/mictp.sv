// mictp: interface module between the muon trigger and the Central Trigger
// Processor (CTP).
//
// * Latches the total multiplicity from the backplane every BC and sends it
//   to the CTP (one register, so all 18 bits leave aligned).
// * Writes {BC number, multiplicity} into a circular pipeline. For each L1A
//   it builds a read-out fragment for the BC `latency` BCs back: header
//   (snbr 0xE, same layout as an octant module), one data word (snbr 0x0:
//   {2'b0, bcid[11:0], mult[17:0]}), trailer (snbr 0xF, err[1] = L1A lost,
//   one data word). It is token slave 0 on the transfer bus.
// * Takes the fast signals from the CTP (BCR, ECR, L1A, monitoring and test
//   signals) and drives them, registered once, onto the backplane, so that
//   every module (this one included) sees them in the same cycle.
// * Passes the wired-OR BUSY of all modules, registered, to the CTP.
// Register bus: 0x0000 CTRL [7:0] latency; 0x0001 BCOFS [11:0] BCs between
// the BC counter and the multiplicity arriving from the backplane.
// The fragment layout, pipeline depth and register map are this design's
// choices; the system description gives the functions.
module mictp
  import muctpi_pkg::*;
#(
  parameter int PIPE_DEPTH = 256,
  parameter int L1AQ_DEPTH = 8,
  parameter int RO_DEPTH   = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // CTP side
  input  logic        ctp_bcr,
  input  logic        ctp_ecr,
  input  logic        ctp_l1a,
  input  logic        ctp_mon,
  input  logic        ctp_test,
  output mult_t       ctp_mult,
  output logic        ctp_busy,
  // backplane side
  input  mult_t       bak_mult,
  output logic        bak_bcr,
  output logic        bak_ecr,
  output logic        bak_l1a,
  output logic        bak_mon,
  output logic        bak_test,
  input  logic        bak_busy,
  output logic        busy,
  input  logic        tk_in,
  output logic        tk_out,
  output logic        ready,
  output logic        dvld,
  output bus_word_t   bus,
  output logic        berr,
  // register bus
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata
);
  localparam int AW = $clog2(PIPE_DEPTH);
  typedef struct packed {
    logic [AW-1:0]     addr;
    logic [EVID_W-1:0] evid;
    logic              mon;
  } ent_t;
  typedef enum logic [2:0] {IDLE, RD, HDR, DAT, TRL} st_t;

  logic [7:0]        latency;
  logic [BCID_W-1:0] bcofs, bcid, bcid_al;
  logic [EVID_W-1:0] evid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctp_mult <= '0; ctp_busy <= 1'b0;
      bak_bcr <= 1'b0; bak_ecr <= 1'b0; bak_l1a <= 1'b0; bak_mon <= 1'b0; bak_test <= 1'b0;
      latency <= '0; bcofs <= '0;
    end else begin
      ctp_mult <= bak_mult;
      ctp_busy <= bak_busy;
      bak_bcr  <= ctp_bcr;
      bak_ecr  <= ctp_ecr;
      bak_l1a  <= ctp_l1a;
      bak_mon  <= ctp_mon;
      bak_test <= ctp_test;
      if (cfg_we && cfg_addr == 16'h0000) latency <= cfg_wdata[7:0];
      if (cfg_we && cfg_addr == 16'h0001) bcofs   <= cfg_wdata[BCID_W-1:0];
    end

  assign cfg_rdata = (cfg_addr == 16'h0000) ? 32'(latency) :
                     (cfg_addr == 16'h0001) ? 32'(bcofs) : 32'h0;

  ttc_counters u_cnt (.clk, .rst_n, .bcr(bak_bcr), .ecr(bak_ecr), .l1a(bak_l1a), .bcid, .evid);
  assign bcid_al = (bcid >= bcofs) ? bcid - bcofs : bcid + BCID_W'(BC_PER_ORBIT) - bcofs;

  // pipeline of multiplicities
  logic [BCID_W+$bits(mult_t)-1:0] pipe [PIPE_DEPTH];
  logic [BCID_W+$bits(mult_t)-1:0] row_q;
  logic [AW-1:0] wp;
  ent_t q_in, q_out, ev;
  logic q_empty, q_full, q_rd, lost;
  logic [$clog2(L1AQ_DEPTH):0] q_count;
  st_t st;

  always_ff @(posedge clk) begin
    pipe[wp] <= {bcid_al, bak_mult};
    row_q    <= pipe[ev.addr];
  end

  assign q_in = '{addr: wp - AW'(1) - AW'(latency), evid: evid, mon: bak_mon};
  sync_fifo #(.WIDTH($bits(ent_t)), .DEPTH(L1AQ_DEPTH)) u_q (
    .clk, .rst_n, .wr(bak_l1a), .wdata(q_in), .rd(q_rd), .rdata(q_out),
    .empty(q_empty), .full(q_full), .count(q_count));

  logic      ro_wr, ro_rd, ro_empty, ro_full, frag_done;
  bus_word_t ro_wdata, ro_rdata;
  logic [$clog2(RO_DEPTH):0] ro_count;

  assign q_rd = (st == IDLE) && !q_empty && ro_count <= ($clog2(RO_DEPTH)+1)'(RO_DEPTH - 3);

  always_comb begin
    ro_wr = 1'b1;
    ro_wdata = '0;
    case (st)
      HDR: ro_wdata = '{snbr: SNBR_HEADER, data: frag_header(ev.evid, row_q[BCID_W+17 -: BCID_W], ev.mon)};
      DAT: ro_wdata = '{snbr: '0, data: {2'b00, row_q}};
      TRL: ro_wdata = '{snbr: SNBR_TRAILER, data: frag_trailer({2'b00, lost, 1'b0}, 12'd1)};
      default: ro_wr = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; st <= IDLE; ev <= '0; lost <= 1'b0; frag_done <= 1'b0;
    end else begin
      wp <= wp + 1'b1;
      frag_done <= 1'b0;
      if (bak_l1a && q_full) lost <= 1'b1;
      case (st)
        IDLE: if (q_rd) begin ev <= q_out; st <= RD; end
        RD:   st <= HDR;
        HDR:  st <= DAT;
        DAT:  st <= TRL;
        TRL:  begin
          st <= IDLE;
          frag_done <= 1'b1;
          if (!(bak_l1a && q_full)) lost <= 1'b0;
        end
        default: st <= IDLE;
      endcase
    end

  sync_fifo #(.WIDTH($bits(bus_word_t)), .DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst_n, .wr(ro_wr), .wdata(ro_wdata), .rd(ro_rd), .rdata(ro_rdata),
    .empty(ro_empty), .full(ro_full), .count(ro_count));

  mibak_token_slave u_tok (
    .clk, .rst_n, .frag_done,
    .fifo_empty (ro_empty), .fifo_rdata (ro_rdata), .fifo_rd (ro_rd),
    .tk_in, .tk_out, .ready, .dvld, .bus, .berr);

  assign busy = (q_count >= ($clog2(L1AQ_DEPTH)+1)'(L1AQ_DEPTH - 2)) ||
                (ro_count > ($clog2(RO_DEPTH)+1)'(RO_DEPTH - 6));

  a_no_ro_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(ro_wr && ro_full));
endmodule
