// muctpi_pkg: constants and types shared by all modules of the muon-to-CTP
// interface. Sizes that the design is built around (16 octant modules of 14
// sectors, six pT thresholds, 3-bit saturating multiplicities, 32-bit sector
// words at the bunch-crossing rate, a 36-bit backplane word of 4-bit sector
// number plus 32 data bits, header code 0xE and trailer/idle code 0xF) come
// from the system description. The bit layout of a sector word, the fragment
// word layouts and the counter widths are this design's own choices.
package muctpi_pkg;

  localparam int N_MIOCT   = 16;   // octant modules
  localparam int N_SECTOR  = 14;   // sectors per octant module
  localparam int N_THR     = 6;    // programmable pT thresholds
  localparam int MULT_W    = 3;    // multiplicity per threshold
  localparam int MULT_MAX  = 7;
  localparam int SECT_W    = 32;   // sector data word
  localparam int SNBR_W    = 4;    // sector number on the backplane
  localparam int BCID_W    = 12;
  localparam int EVID_W    = 20;
  localparam int BC_PER_ORBIT = 3564;

  localparam logic [SNBR_W-1:0] SNBR_HEADER  = 4'hE;
  localparam logic [SNBR_W-1:0] SNBR_TRAILER = 4'hF;

  // Sector positions inside one octant module (one half in eta).
  localparam int S_BA31 = 0, S_BA32 = 1, S_BA01 = 2, S_BA02 = 3;
  localparam int S_EC46 = 4, S_EC47 = 5, S_EC48 = 6, S_EC01 = 7, S_EC02 = 8, S_EC03 = 9;
  localparam int S_FW23 = 10, S_FW24 = 11, S_FW01 = 12, S_FW02 = 13;

  // Barrel/end-cap neighbourhood: bit e of BE_MAP_DEFAULT[b] is set when
  // barrel sector b (BA31, BA32, BA01, BA02) overlaps end-cap sector e
  // (EC46, EC47, EC48, EC01, EC02, EC03), read from the phi ranges of the
  // sector map of one octant.
  localparam logic [3:0][5:0] BE_MAP_DEFAULT = {6'b110000, 6'b011000, 6'b000110, 6'b000011};

  typedef logic [N_THR-1:0][MULT_W-1:0] mult_t;     // 18 bits, threshold k at [k-1]

  // One muon-track candidate. pt = index (1..6) of the highest threshold
  // passed, 0 = no candidate. ovl[0]: lies in a barrel/barrel overlap
  // region, ovl[1]: lies in the barrel/end-cap overlap region.
  typedef struct packed {
    logic [2:0] pt;
    logic [7:0] roi;
    logic [1:0] ovl;
  } cand_t;                                          // 13 bits

  typedef struct packed {
    logic [2:0] spare;
    cand_t      c1;
    cand_t      c0;
    logic [2:0] bcid;                                // low BCID bits
  } sector_word_t;                                   // 32 bits

  typedef struct packed {
    logic [SNBR_W-1:0] snbr;
    logic [31:0]       data;
  } bus_word_t;                                      // 36 bits on the MIBAK

  // Fragment header data: {monitoring flag, 0, bcid[11:0], evid[19:0]} would
  // need 33 bits, so the event number is cut to 19 bits in the header.
  function automatic logic [31:0] frag_header(input logic [EVID_W-1:0] evid,
                                              input logic [BCID_W-1:0] bcid,
                                              input logic              mon);
    return {mon, bcid, evid[18:0]};
  endfunction

  // Fragment trailer data: {error flags[3:0], 0.., word count[11:0]}.
  function automatic logic [31:0] frag_trailer(input logic [3:0]  err,
                                               input logic [11:0] nwords);
    return {err, 16'h0, nwords};
  endfunction

  // Saturating add of two 3-bit multiplicity vectors.
  function automatic mult_t mult_add_sat(input mult_t a, input mult_t b);
    mult_t r;
    for (int k = 0; k < N_THR; k++) begin
      logic [MULT_W:0] s;
      s = {1'b0, a[k]} + {1'b0, b[k]};
      r[k] = (s > (MULT_W+1)'(MULT_MAX)) ? MULT_W'(MULT_MAX) : s[MULT_W-1:0];
    end
    return r;
  endfunction

  // ---------------- read-out driver records ----------------
  localparam int N_SLAVE = N_MIOCT + 1;             // CTP interface + octants

  // One extracted muon-track candidate.
  typedef struct packed {
    logic [7:0] sector_id;    // mapped geometrical identifier
    logic [2:0] pt;
    logic [7:0] roi;
    logic [1:0] ovl;
    logic       cidx;         // first or second candidate of the sector
    logic       in_trig;      // belongs to the triggering BC
    logic [2:0] bc;           // low BCID bits of its sector word
  } rod_cand_t;               // 26 bits

  // General event information.
  typedef struct packed {
    logic [18:0] evid;
    logic [11:0] bcid;
    mult_t       mult;
    logic        mon;
    logic [3:0]  err;
    logic [11:0] ncand;       // candidates that follow this header
  } ev_hdr_t;

  // Item of the stream that feeds the three processing branches: a header
  // followed by ncand candidates.
  typedef struct packed {
    logic      is_hdr;
    ev_hdr_t   hdr;
    rod_cand_t cand;
  } ev_item_t;

  // 32-bit data word of a candidate in read-out and monitoring records.
  function automatic logic [31:0] cand_word(input rod_cand_t c);
    return {2'b00, c.in_trig, c.cidx, c.ovl, c.pt, c.sector_id, c.roi, c.bc, 4'b0000};
  endfunction

endpackage
