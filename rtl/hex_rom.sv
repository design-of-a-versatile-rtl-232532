// hex_rom: asynchronous-read lookup table whose contents are loaded from a hex image
// with $readmemh.  Used for the function tables of the exponential and the
// division/logarithm units; each image holds one entry per line, most significant
// digit first.  The formula behind each image is given where the ROM is instantiated.
// Interface: `addr` in, `data` out in the same cycle (no clock).
module hex_rom #(
  parameter int    WIDTH = 48,
  parameter int    DEPTH = 256,
  parameter string FILE  = "rtl/exp2_tab.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial $readmemh(FILE, mem);

  assign data = mem[addr];

endmodule
