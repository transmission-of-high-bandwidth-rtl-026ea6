// rx_device: receiver device of one lane, the PMA followed by the PCS.
//
// The deserializer recovers 10-bit codes from the line on the high-speed
// clock and aligns them on K28.5 commas. From the first comma on, the decoder
// turns each code into an 8-bit value and a control flag on the low-speed
// clock, one character per clock. 'aligned' is re-registered on the low-speed
// clock. This split follows the document.
module rx_device #(
  parameter int unsigned RATIO = 10
) (
  input  logic       clk,
  input  logic       clk_ser,
  input  logic       rst_n,
  input  logic       ser_in,
  output logic       aligned,
  output logic       rx_k,
  output logic [7:0] rx_data,
  output logic       code_err,
  output logic       disp_err
);
  logic [9:0] code;
  logic       aligned_ser;

  deserializer #(.RATIO(RATIO)) u_pma (
    .clk_ser, .rst_n, .ser_in, .par_out(code), .aligned(aligned_ser)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) aligned <= 1'b0;
    else        aligned <= aligned_ser;
  end

  dec_8b10b u_pcs (
    .clk, .rst_n, .en(aligned), .code, .k(rx_k), .dout(rx_data), .code_err, .disp_err
  );
endmodule
