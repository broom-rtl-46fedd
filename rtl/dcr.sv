// dcr: dynamic column redundancy for one SRAM row.
//
// The row stores WIDTH data bits plus one spare column (bit WIDTH).  A
// redundancy address (ra_valid, ra_pos) names one faulty column.  On a
// write, data bits from ra_pos upward are shifted one column up so that the
// faulty column holds nothing needed and the top data bit lands in the
// spare; on a read the same multiplexer shift is undone.  Without a valid
// redundancy address the data goes straight through and the spare column
// is written with 0.  Purely combinational; the redundancy address is held
// per cache line by the L2 fault map.
// The spare bit per row and the shift driven by a redundancy address follow
// the design description; the per-line granularity is this design's choice.
module dcr #(
  parameter int unsigned WIDTH = 64,
  localparam int unsigned PW   = $clog2(WIDTH)
) (
  input  logic             ra_valid,
  input  logic [PW-1:0]    ra_pos,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH:0]   wrow,
  input  logic [WIDTH:0]   rrow,
  output logic [WIDTH-1:0] rdata
);

  always_comb begin
    wrow = {1'b0, wdata};
    if (ra_valid) begin
      for (int i = 0; i <= WIDTH; i++) begin
        if (i < int'(ra_pos))       wrow[i] = wdata[i];
        else if (i == int'(ra_pos)) wrow[i] = 1'b0;          // faulty column, unused
        else                        wrow[i] = wdata[i-1];
      end
    end
  end

  always_comb begin
    rdata = rrow[WIDTH-1:0];
    if (ra_valid) begin
      for (int i = 0; i < WIDTH; i++)
        rdata[i] = (i < int'(ra_pos)) ? rrow[i] : rrow[i+1];
    end
  end

endmodule
