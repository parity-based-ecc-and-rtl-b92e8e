// ppc_pkg: types shared by the Parity Product Code (PPC) link.
//
// The receiving terminal answers every packet with one feedback message to the
// sending terminal. The kinds below are the requests of the PPC scheme: an
// acknowledge (the packet is correct or has been corrected), a request for
// the parity flit F_P (adaptive F_P mode), a selective row ARQ (resend the
// listed bit-index columns), a selective flit-index ARQ (resend the listed
// flits) and a full ARQ (resend the whole packet, go-back-M mode). The
// encoding of the kinds is this design's own.
package ppc_pkg;

  typedef enum logic [2:0] {
    FB_NONE     = 3'd0,
    FB_ACK      = 3'd1,
    FB_FP_REQ   = 3'd2,
    FB_ROW_ARQ  = 3'd3,
    FB_FLIT_ARQ = 3'd4,
    FB_FULL_ARQ = 3'd5
  } fb_kind_e;

endpackage
