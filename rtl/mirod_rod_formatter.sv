// mirod_rod_formatter: event formatter and S-Link source of one processing
// branch of the read-out driver (used once for the Level-2 branch and once
// for the data-acquisition branch).
//
// Takes an event as a header item followed by hdr.ncand candidate items and
// writes it to the S-Link source interface in the read-out driver (ROD)
// event format:
//   control word 0xB0F00000 (uctrl=1, begin of fragment)
//   header:  0xEE1234EE, header size 9, format version 0x03000000,
//            source identifier, run number, L1ID = event number,
//            BCID, trigger type 0, event type {mon, err[3:0]}
//   status:  {28'b0, err[3:0]}
//   data:    {14'b0, total multiplicity}, then one word per candidate
//   trailer: number of status words (1), number of data words (1+ncand),
//            status position 0 (status before data)
//   control word 0xE0F00000 (uctrl=1, end of fragment)
// The use of the ROD event format comes from the system description; the
// field values follow the common ATLAS ROD layout and the data-word layout
// is this design's own. The link-full flag lff stops the output at once:
// no word is written (uwen low) in a cycle where lff is high.
// Timing: one word per cycle while lff is low.
module mirod_rod_formatter
  import muctpi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] source_id,
  input  logic [31:0] run_no,
  input  logic        in_valid,
  output logic        in_ready,
  input  ev_item_t    in_item,
  // S-Link source side
  output logic [31:0] ud,
  output logic        uctrl,
  output logic        uwen,
  input  logic        lff
);
  typedef enum logic [1:0] {IDLE, HEAD, DATA, TRAIL} st_t;
  st_t st;
  ev_hdr_t h;
  logic [3:0]  idx;
  logic [11:0] left;

  always_comb begin
    ud = '0; uctrl = 1'b0; uwen = 1'b0; in_ready = 1'b0;
    case (st)
      IDLE: in_ready = 1'b1;
      HEAD: begin
        uwen = !lff;
        case (idx)
          4'd0:  begin ud = 32'hB0F0_0000; uctrl = 1'b1; end
          4'd1:  ud = 32'hEE12_34EE;
          4'd2:  ud = 32'd9;
          4'd3:  ud = 32'h0300_0000;
          4'd4:  ud = source_id;
          4'd5:  ud = run_no;
          4'd6:  ud = 32'(h.evid);
          4'd7:  ud = 32'(h.bcid);
          4'd8:  ud = 32'h0;
          4'd9:  ud = 32'({h.mon, h.err});
          4'd10: ud = 32'(h.err);
          default: ud = 32'(h.mult);
        endcase
      end
      DATA: begin
        in_ready = !lff;
        uwen     = !lff && in_valid;
        ud       = cand_word(in_item.cand);
      end
      TRAIL: begin
        uwen = !lff;
        case (idx)
          4'd0: ud = 32'd1;
          4'd1: ud = 32'(h.ncand) + 32'd1;
          4'd2: ud = 32'd0;
          default: begin ud = 32'hE0F0_0000; uctrl = 1'b1; end
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= IDLE; h <= '0; idx <= '0; left <= '0;
    end else begin
      case (st)
        IDLE: if (in_valid && in_item.is_hdr) begin
          h    <= in_item.hdr;
          left <= in_item.hdr.ncand;
          idx  <= '0;
          st   <= HEAD;
        end
        HEAD: if (!lff) begin
          idx <= idx + 1'b1;
          if (idx == 4'd11) begin
            idx <= '0;
            st  <= (left == 0) ? TRAIL : DATA;
          end
        end
        DATA: if (!lff && in_valid) begin
          left <= left - 1'b1;
          if (left == 12'd1) st <= TRAIL;
        end
        TRAIL: if (!lff) begin
          idx <= idx + 1'b1;
          if (idx == 4'd3) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
endmodule
