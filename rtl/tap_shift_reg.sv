// tap_shift_reg: capture/shift register of the JTAG instruction and IDCODE
// registers.
//
// On the rising edge of TCK, when enable_i is high, capture_i loads
// parallel_i and shift_i shifts one bit towards the LSB with serial_i
// entering at the MSB; otherwise the value is held. serial_o is bit 0, the
// bit TDO sees first; parallel_o is the whole register. The asynchronous
// reset clears it. The function follows the document; the shift direction is
// the IEEE 1149.1 convention (LSB first). WIDTH must be at least 2.
module tap_shift_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             tck_i,
  input  logic             trst_ni,
  input  logic             enable_i,
  input  logic             capture_i,
  input  logic             shift_i,
  input  logic             serial_i,
  input  logic [WIDTH-1:0] parallel_i,
  output logic             serial_o,
  output logic [WIDTH-1:0] parallel_o
);
  logic [WIDTH-1:0] q;

  always_ff @(posedge tck_i or negedge trst_ni) begin
    if (!trst_ni)                   q <= '0;
    else if (enable_i && capture_i) q <= parallel_i;
    else if (enable_i && shift_i)   q <= {serial_i, q[WIDTH-1:1]};
  end

  assign serial_o   = q[0];
  assign parallel_o = q;
endmodule
