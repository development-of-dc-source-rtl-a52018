// sine_carrier: the sine-carrier subsystem.
//
// The control unit walks a quarter-wave sine table and a full-period carrier
// table once per sampling clock. The sine table's output goes straight to
// MUX1's and MUX2's first inputs and, through the processing unit (reflection
// about 128), to their second inputs. The half-period flag, delayed one clock
// to match the memory read, selects:
//   flag = 0 : sine1 = table value,     sine2 = reflected value
//   flag = 1 : sine1 = reflected value, sine2 = table value
// so sine1 is the constant-amplitude reference sine and sine2 its negative,
// the pair a unipolar full bridge needs. `carrier` is the carrier table output.
// All three outputs refer to the phase the control unit held one clock earlier.
// The structure follows the document's block diagram; the flag pipeline
// register and the MUX select polarity are this design's.
module sine_carrier
  import spwm_pkg::*;
#(
  parameter int unsigned QUARTER     = 160_000,
  parameter int unsigned CARRIER_LEN = 32
) (
  input  logic    clk,
  input  logic    rst,
  output sample_t sine1,
  output sample_t sine2,
  output sample_t carrier,
  output logic    flag,      // half-period flag aligned with sine1/sine2
  output logic [1:0] quadrant, // quadrant of the control unit (not delayed)
  output logic    wrap       // last cycle of an output period (not delayed)
);

  localparam int unsigned SAW = (QUARTER > 1) ? $clog2(QUARTER) : 1;
  localparam int unsigned CAW = (CARRIER_LEN > 1) ? $clog2(CARRIER_LEN) : 1;

  logic [SAW-1:0] sine_addr;
  logic [CAW-1:0] carrier_addr;
  logic           flag_addr;
  sample_t        sine_data, ys;

  control_unit #(.QUARTER(QUARTER), .CARRIER_LEN(CARRIER_LEN)) u_ctrl (
    .clk, .rst, .sine_addr, .carrier_addr, .flag(flag_addr), .quadrant, .wrap
  );

  sine_memory #(.QUARTER(QUARTER)) u_sine (
    .clk, .addr(sine_addr), .data(sine_data)
  );

  carrier_memory #(.CARRIER_LEN(CARRIER_LEN)) u_carrier (
    .clk, .addr(carrier_addr), .data(carrier)
  );

  processing_unit u_proc (.sine_data, .ys);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) flag <= 1'b0;
    else     flag <= flag_addr;
  end

  // MUX1 and MUX2
  always_comb begin
    sine1 = flag ? ys : sine_data;
    sine2 = flag ? sine_data : ys;
  end

endmodule
