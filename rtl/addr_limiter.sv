// addr_limiter: start and stop address of a march element.
//
// The test range is [lim_lo, lim_hi] (inclusive, lim_lo <= lim_hi). An
// upward element starts at lim_lo and stops at lim_hi; a downward element
// starts at lim_hi and stops at lim_lo. Purely combinational.
//
// The published architecture names an address limiter that supplies the
// start and stop points to the address counter; taking the range from two
// input ports, so that a sub-range can be tested, is this design's choice.
module addr_limiter #(
  parameter int unsigned AW = 4
) (
  input  logic [AW-1:0] lim_lo,
  input  logic [AW-1:0] lim_hi,
  input  logic          down,
  output logic [AW-1:0] first_addr,
  output logic [AW-1:0] last_addr
);
  always_comb begin
    if (down) begin
      first_addr = lim_hi;
      last_addr  = lim_lo;
    end else begin
      first_addr = lim_lo;
      last_addr  = lim_hi;
    end
  end
endmodule
