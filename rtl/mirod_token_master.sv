// mirod_token_master: collects one event from the MIBAK transfer bus.
//
// It waits until the wired-AND READY line shows that every module holds a
// fragment and the downstream buffers have room (space_ok), then sends the
// token (tk_out, one-cycle pulse). While the token travels along the chain
// every valid bus word is passed on (w_valid, w) together with the index of
// the slave it came from (w_src: counted from the headers, 0 = CTP
// interface, 1..16 = octant modules). When the token returns (tk_back) the
// event is closed one cycle later with ev_end and the error summary ev_err:
//   [0] ERROR line raised by a slave, [1] token did not return within
//   TIMEOUT cycles, [2] number of fragments differs from N_FRAG,
//   [3] bus word outside a transfer or header/trailer out of order.
// A faulty event is still passed on complete, flagged, so that the data
// flow is not disturbed. busy is high while the downstream buffers lack
// room. Two idle cycles follow each event so that the slaves' READY has
// settled. Error codes, timeout and gap are this design's choices.
module mirod_token_master
  import muctpi_pkg::*;
#(
  parameter int N_FRAG  = N_SLAVE,
  parameter int TIMEOUT = 4096
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ready,
  input  logic       dvld,
  input  bus_word_t  bus,
  input  logic       berr,
  input  logic       tk_back,
  output logic       tk_out,
  input  logic       space_ok,
  output logic       w_valid,
  output bus_word_t  w,
  output logic [4:0] w_src,
  output logic       ev_end,
  output logic [3:0] ev_err,
  output logic       busy
);
  typedef enum logic [1:0] {IDLE, XFER, GAP} st_t;
  st_t st;
  logic [12:0] timer;
  logic [5:0]  nhdr;
  logic        in_frag;
  logic [3:0]  err;
  logic [1:0]  gap;
  logic        open_end;     // a fragment is still open after this cycle

  assign open_end = dvld ? (bus.snbr == SNBR_HEADER || (in_frag && bus.snbr != SNBR_TRAILER))
                         : in_frag;

  assign busy = !space_ok;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= IDLE; timer <= '0; nhdr <= '0; in_frag <= 1'b0; err <= '0; gap <= '0;
      tk_out <= 1'b0; w_valid <= 1'b0; w <= '0; w_src <= '0; ev_end <= 1'b0; ev_err <= '0;
    end else begin
      tk_out  <= 1'b0;
      w_valid <= 1'b0;
      ev_end  <= 1'b0;
      case (st)
        IDLE: begin
          if (dvld) err[3] <= 1'b1;                  // data outside a transfer
          if (ready && space_ok) begin
            tk_out  <= 1'b1;
            timer   <= '0;
            nhdr    <= '0;
            in_frag <= 1'b0;
            st      <= XFER;
          end
        end
        XFER: begin
          timer <= timer + 1'b1;
          if (berr) err[0] <= 1'b1;
          if (dvld) begin
            w_valid <= 1'b1;
            w       <= bus;
            if (bus.snbr == SNBR_HEADER) begin
              if (in_frag) err[3] <= 1'b1;
              in_frag <= 1'b1;
              nhdr    <= nhdr + 1'b1;
              w_src   <= 5'(nhdr);
            end else if (bus.snbr == SNBR_TRAILER) begin
              if (!in_frag) err[3] <= 1'b1;
              in_frag <= 1'b0;
            end else if (!in_frag) err[3] <= 1'b1;
          end
          if (tk_back || timer == 13'(TIMEOUT)) begin
            ev_err <= {err[3] | open_end,
                       nhdr + 6'(dvld && bus.snbr == SNBR_HEADER) != 6'(N_FRAG),
                       !tk_back, err[0] | berr};
            err    <= '0;
            gap    <= '0;
            st     <= GAP;
          end
        end
        GAP: begin
          ev_end <= (gap == 2'd0);
          gap <= gap + 1'b1;
          if (gap == 2'd1) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
endmodule
