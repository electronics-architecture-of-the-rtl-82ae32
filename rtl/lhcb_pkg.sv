// lhcb_pkg: types and constants shared by the front-end (FE), back-end (BE)
// and Timing and Fast Control (TFC) blocks of the readout slice.
//
// The LHC orbit (3564 crossings, the last 119 empty), the 12-bit bunch
// identifier, the 80-bit GBT data field and the two TFC word layouts are the
// architecture's own numbers. The header width m = 11 is the architecture's
// worked example (up to 64 bits of data per crossing -> 6-bit length field);
// since a 6-bit field holds at most 63, the largest payload here is 63 bits.
// Fragment, decision and Event-ID widths are this design's own choices.
package lhcb_pkg;

  localparam int ORBIT_BX   = 3564;  // crossings per LHC orbit
  localparam int EMPTY_BX   = 119;   // empty crossings at the end of the orbit
  localparam int BID_W      = 12;    // bunch identifier width
  localparam int GBT_D_W    = 80;    // GBT user data field (D)
  localparam int TFC_FE_W   = 24;    // TFC word towards the FE
  localparam int TFC_INFO_W = 44;    // TFC word from master to TFC interface
  localparam int HDR_M      = 11;    // FE header width m
  localparam int LEN_W      = HDR_M - 5;
  localparam int MAX_DATA_W = (1 << LEN_W) - 1;  // 63 data bits per crossing
  localparam int PKT_W      = HDR_M + MAX_DATA_W; // 74
  localparam int EID_W      = 24;    // Event-ID width
  localparam int DEST_W     = 16;    // MEP destination width
  localparam int THR_W      = 19;    // throttle word width (< 20 bits)

  // Trigger types carried in the TFC word (this design's encoding)
  localparam logic [3:0] TT_PHYSICS = 4'd0;
  localparam logic [3:0] TT_CALIB   = 4'd1;
  localparam logic [3:0] TT_NZS     = 4'd2;

  // FE data header, bit 0 first: [0] truncated, [4:1] Bcnt LSBs, [m-1:5] length
  typedef struct packed {
    logic [LEN_W-1:0] len;
    logic [3:0]       bcnt;
    logic             trunc;
  } fe_header_t;

  // One crossing's packet: header in the low bits, data above it
  typedef struct packed {
    logic [MAX_DATA_W-1:0] data;
    fe_header_t            hdr;
  } fe_packet_t;

  // 24-bit TFC word to the FE
  typedef struct packed {
    logic [11:0] bid;
    logic [2:0]  reserve;
    logic [3:0]  calib_type;
    logic        bx_veto;
    logic        nzs;
    logic        data_force;
    logic        fe_reset;
    logic        bid_reset;
  } tfc_fe_word_t;

  // 44-bit TFC word from the master to the TFC interface
  typedef struct packed {
    logic [11:0]       bid;
    logic [DEST_W-1:0] mep_dest;
    logic [3:0]        trig_type;
    logic [3:0]        calib_type;
    logic              trigger;
    logic              bx_veto;
    logic              nzs;
    logic              data_force;
    logic              be_reset;
    logic              fe_reset;
    logic              eid_reset;
    logic              bid_reset;
  } tfc_info_t;

  // Interaction-trigger decision for one crossing, as kept in the BE
  typedef struct packed {
    logic [11:0]       bid;
    logic              accept;
    logic [DEST_W-1:0] mep_dest;
    logic [3:0]        trig_type;
  } trig_decision_t;

  // Accepted event fragment of one link
  typedef struct packed {
    logic [EID_W-1:0]  eid;
    logic [11:0]       bid;
    logic [DEST_W-1:0] mep_dest;
    logic [3:0]        trig_type;
    fe_packet_t        pkt;
  } fragment_t;

  // Total length in bits of a packet on the link
  function automatic int unsigned pkt_bits(fe_header_t h);
    return HDR_M + int'(h.len);
  endfunction

endpackage
