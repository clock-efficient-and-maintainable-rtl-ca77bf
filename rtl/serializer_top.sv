// Top level of the header/data serializer device.
//
// The device takes NINPUTS data bytes on parallel inputs, three header
// enables and a run request, and produces a record of optional header bytes
// followed by the data bytes on a byte-wide stream (data_out, qualified by
// data_valid), one byte per clock and without idle cycles for disabled
// headers.  All of the work is done in ft_serializer; this level fixes the
// device's pin-out.  The byte stream is where the serial link that carries
// the record away would attach: the link itself is not part of this design,
// so its side is brought out as plain ports.
//
// Timing is that of ft_serializer: the first byte appears in the cycle after
// run is sampled high, a record lasts (enabled headers + NINPUTS) cycles, and
// data_out/data_valid are combinational from the internal registers and the
// header/data inputs.  Reset is asynchronous and active low.
module serializer_top
  import serializer_pkg::*;
#(
  parameter int unsigned NINPUTS  = serializer_pkg::DEF_NINPUTS,
  parameter byte_t       HEADER_A = serializer_pkg::DEF_HEADER_A,
  parameter byte_t       HEADER_B = serializer_pkg::DEF_HEADER_B,
  parameter byte_t       HEADER_C = serializer_pkg::DEF_HEADER_C
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic                     hdr_a_en,
  input  logic                     hdr_b_en,
  input  logic                     hdr_c_en,
  input  logic [NINPUTS-1:0][7:0]  data,
  // towards the serial link
  output logic [7:0]               link_data,
  output logic                     link_valid
);

  ft_serializer #(
    .NINPUTS  (NINPUTS),
    .HEADER_A (HEADER_A),
    .HEADER_B (HEADER_B),
    .HEADER_C (HEADER_C)
  ) u_ser (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (run),
    .hdr_a_en   (hdr_a_en),
    .hdr_b_en   (hdr_b_en),
    .hdr_c_en   (hdr_c_en),
    .data       (data),
    .data_out   (link_data),
    .data_valid (link_valid)
  );

endmodule
