// addr_decoder: the controller's all-purpose address decoder.
//
// Every register of the controller is written under a strobe that a wide
// AND of (possibly inverted) address lines produces, such as "Dec ps" for the
// power switches and "Dec cfs" for the clock frequency selector.  The decoder
// is "all-purpose" in that the same block serves every strobe: the address
// pattern is a parameter (MATCH) and any address line can be left out of the
// comparison (the 1 bits of DONT_CARE).  The strobe is combinational:
//
//   dec = en && ((addr ^ MATCH) & ~DONT_CARE) == 0
//
// `en` is the bus cycle qualifier (chip select and write or read), so the
// strobe lasts exactly as long as the bus cycle.  Parameterising the pattern
// is this design's choice; the source shows only the AND of address lines.
module addr_decoder #(
  parameter int unsigned          ADDR_W    = 16,
  parameter logic [ADDR_W-1:0]    MATCH     = '0,
  parameter logic [ADDR_W-1:0]    DONT_CARE = '0
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic              en,
  output logic              dec
);

  assign dec = en && (((addr ^ MATCH) & ~DONT_CARE) == '0);

endmodule
