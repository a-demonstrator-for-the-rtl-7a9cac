// mibak_token_slave: the read-out side of one module (MICTP or MIOCT) on the
// MIBAK transfer bus.
//
// Event fragments wait in the module's read-out FIFO, each framed by a header
// word (sector number 0xE) and a trailer word (0xF). frag_done pulses when a
// complete fragment has been written; the slave counts complete fragments
// and raises ready (its contribution to the wired-AND READY line) while at
// least one is stored. When the token arrives (tk_in, one-cycle pulse) the
// slave drives one fragment onto the bus, one word per BC with dvld high,
// and then passes the token on (tk_out, one-cycle pulse). While it does not
// own the bus it drives zeros, so the backplane can OR all drivers.
//
// Errors, as the system description lists them: the token arrives while no
// fragment is ready, or the fragment does not start with a header or the
// FIFO runs dry before its trailer. Either raises berr (wired-OR ERROR) for
// one cycle; the token is passed on regardless.
//
// Timing: with the token sampled at clock edge n, the first word is on the
// bus after edge n+1 (counting edge n as the first, in the second cycle);
// tk_out comes in the same cycle as the trailer word. A token that finds
// no fragment leaves, with berr, right after edge n. Outputs are registered.
module mibak_token_slave
  import muctpi_pkg::*;
#(
  parameter int CNT_W = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      frag_done,
  input  logic      fifo_empty,
  input  bus_word_t fifo_rdata,
  output logic      fifo_rd,
  input  logic      tk_in,
  output logic      tk_out,
  output logic      ready,
  output logic      dvld,
  output bus_word_t bus,
  output logic      berr
);
  typedef enum logic [1:0] {IDLE, SEND} st_t;
  st_t st;
  logic [CNT_W-1:0] nfrag;
  logic first, sent_trl;

  assign ready = (nfrag != 0);
  assign fifo_rd = (st == SEND) && !fifo_empty;
  assign sent_trl = fifo_rd && fifo_rdata.snbr == SNBR_TRAILER;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= IDLE; nfrag <= '0; first <= 1'b0;
      tk_out <= 1'b0; dvld <= 1'b0; bus <= '0; berr <= 1'b0;
    end else begin
      tk_out <= 1'b0;
      dvld   <= 1'b0;
      bus    <= '0;
      berr   <= 1'b0;
      nfrag  <= nfrag + CNT_W'(frag_done) - CNT_W'(sent_trl);
      case (st)
        IDLE: if (tk_in) begin
          if (ready) begin
            st    <= SEND;
            first <= 1'b1;
          end else begin
            berr   <= 1'b1;
            tk_out <= 1'b1;
          end
        end
        SEND: begin
          if (fifo_empty) begin                      // ran dry: framing error
            berr   <= 1'b1;
            tk_out <= 1'b1;
            st     <= IDLE;
          end else begin
            dvld  <= 1'b1;
            bus   <= fifo_rdata;
            first <= 1'b0;
            if (first && fifo_rdata.snbr != SNBR_HEADER) berr <= 1'b1;
            if (fifo_rdata.snbr == SNBR_TRAILER) begin
              tk_out <= 1'b1;
              st     <= IDLE;
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
endmodule
