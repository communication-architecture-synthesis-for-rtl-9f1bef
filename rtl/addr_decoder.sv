// addr_decoder: address decoder of the bridge.
//
// Every component owns one address range [BASE, LIMIT]. When `valid` is
// high, the component whose range holds `addr` gets its chip select (cs,
// one-hot), `dest_bus` gives the bus that component is allocated to and
// `hit_idx` its index. An address that falls in no range raises
// illegal_address, for error handling. Purely combinational. The ranges,
// CS and Illegal_Address are the document's; the example address map
// (4 KiB per component, see bridge_pkg) is this design's.
module addr_decoder
  import bridge_pkg::*;
#(
  parameter int unsigned          NC     = NCOMP,
  parameter int unsigned          AW     = ADDR_W,
  parameter logic [NC*AW-1:0]     BASE   = EX_BASE,
  parameter logic [NC*AW-1:0]     LIMIT  = EX_LIMIT,
  parameter logic [NC-1:0]        BUS_OF = EX_BUS_OF
) (
  input  logic                    valid,
  input  logic [AW-1:0]           addr,
  output logic [NC-1:0]           cs,
  output logic                    illegal_address,
  output logic                    dest_bus,
  output logic [$clog2(NC)-1:0]   hit_idx
);

  always_comb begin
    cs       = '0;
    hit_idx  = '0;
    dest_bus = 1'b0;
    for (int i = 0; i < int'(NC); i++) begin
      if (valid && addr >= BASE[i*AW +: AW] && addr <= LIMIT[i*AW +: AW] && cs == '0) begin
        cs[i]    = 1'b1;
        hit_idx  = ($clog2(NC))'(i);
        dest_bus = BUS_OF[i];
      end
    end
    illegal_address = valid && (cs == '0);
  end

endmodule
