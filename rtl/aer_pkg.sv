// aer_pkg: sizes and record layouts shared by the AER convolution blocks.
//
// The image is 256x256 pixels, so a pixel address is 16 bits ({y, x}, y in
// the upper byte). An event on the output side of the mapper carries one more
// bit, the sign: a negative kernel coefficient is expressed by sending the
// event to a separate "negative" address rather than by a negative
// probability. The mapping table holds 8 slots per input pixel (512K words of
// 32 bits for 64K pixels). Each slot is one 32-bit word, laid out as
// map_word_t below. The slot layout, the 9-bit probability field and the
// 4-bit repetition field are this design's own choices; the 256x256 image,
// the 8 slots and the 512Kx32 table follow the board described for it.
package aer_pkg;

  // Pixel address width: 256x256 image -> 64K addresses.
  localparam int unsigned PIX_W  = 16;
  // Signed event address width: {neg, pixel}.
  localparam int unsigned EVT_W  = PIX_W + 1;
  // Output events per input event (slots per table entry).
  localparam int unsigned SLOTS  = 8;
  localparam int unsigned SLOT_W = $clog2(SLOTS);
  // Mapping table: 64K pixels x 8 slots = 512K words of 32 bits.
  localparam int unsigned TAB_AW = PIX_W + SLOT_W;
  localparam int unsigned TAB_DW = 32;
  // Probability is P/256 with P in 0..256, so 1.0 is exact.
  localparam int unsigned PROB_W = 9;
  // Random number drawn from the LFSR for each emission decision: 0..255.
  localparam int unsigned RND_W  = 8;
  // Repetition factor 0..15 (0 marks an empty slot).
  localparam int unsigned REP_W  = 4;
  // Reconstruction counter width: holds +-(1000 frames x 255 events).
  localparam int unsigned REC_W  = 20;

  // A signed address-event: neg = 1 for the negative half-image.
  typedef struct packed {
    logic             neg;
    logic [PIX_W-1:0] pix;
  } aer_evt_t;

  // One slot of the mapping table (32 bits).
  typedef struct packed {
    logic              rsvd;  // bit 31, unused
    logic              last;  // bit 30, last used slot of this input pixel
    logic [REP_W-1:0]  rep;   // bits 29:26, repetition factor R
    logic [PROB_W-1:0] prob;  // bits 25:17, probability P/256
    aer_evt_t          evt;   // bits 16:0, output event {neg, pixel}
  } map_word_t;

endpackage
