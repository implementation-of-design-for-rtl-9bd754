// ncl_pkg: shared types and helpers for the dual-rail NULL Convention Logic
// (NCL) adder.
//
// A dual-rail signal carries one bit on two wires. Rail r1 high means DATA1,
// rail r0 high means DATA0, and both rails low mean NULL (the spacer that
// separates two DATA wavefronts). Both rails high is illegal. The handshake
// signals ki/ko use the usual NCL polarity: 1 is "request for DATA" (rfd) and
// 0 is "request for NULL" (rfn).
package ncl_pkg;

  typedef struct packed {
    logic r1;  // DATA1 rail
    logic r0;  // DATA0 rail
  } dr_t;

  localparam dr_t DR_NULL = '{r1: 1'b0, r0: 1'b0};

  // Handshake levels on ki/ko.
  localparam logic RFD = 1'b1;
  localparam logic RFN = 1'b0;

  // Encode a Boolean bit as a DATA dual-rail value.
  function automatic dr_t dr_data(input logic b);
    return b ? '{r1: 1'b1, r0: 1'b0} : '{r1: 1'b0, r0: 1'b1};
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return !(d.r1 | d.r0);
  endfunction

  function automatic logic dr_is_illegal(input dr_t d);
    return d.r1 & d.r0;
  endfunction

endpackage
