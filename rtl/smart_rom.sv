// smart_rom: table of the 128 retarding-grid voltages used by the "smart"
// sweep.
//
// The smart sweep concentrates its points in the middle of the voltage
// range, where the collected current changes fastest, using 128 stored
// 16-bit DAC codes; a 64-point sweep uses every second entry and a 32-point
// sweep every fourth. The table size and the way it is strided follow the
// instrument description; the stored values do not, because they are not
// published. This design fills the table with a cubic law that is flat in
// the middle of the range:
//   x(i)    = 2*i - 127            (odd, -127 .. 127)
//   code(i) = 32768 + (x^3 * 32767) / 127^3   (integer division toward 0)
// which runs monotonically from 1 (i=0) to 65535 (i=127) with the smallest
// steps near code 32768. The table is computed at elaboration, so no data
// file is needed; change smart_code() to load other values.
// Interface: synchronous read, 'data' is valid one clock after 'addr'.
module smart_rom #(
  parameter int unsigned ENTRIES = 128
) (
  input  logic                       clk,
  input  logic [$clog2(ENTRIES)-1:0] addr,
  output logic [15:0]                data
);

  function automatic logic [15:0] smart_code(int unsigned i);
    longint x, n;
    logic [63:0] r;
    n = longint'(ENTRIES) - 1;
    x = 2 * longint'(i) - n;
    r = 64'(32768 + (32767 * x * (n * n + 4 * x * x)) / (5 * n * n * n));
    return r[15:0];
  endfunction

  logic [15:0] table_q [ENTRIES];

  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++) table_q[i] = smart_code(i);
  end

  always_ff @(posedge clk) data <= table_q[addr];

endmodule
