// tx_device: transmitter device of one lane, the PCS followed by the PMA.
//
// The frame generator's character {tx_k, tx_data} is 8b/10b coded on the
// low-speed clock (PCS, one clock of latency) and the code is shifted onto
// the line on the high-speed clock (PMA serializer). Latency from character
// to its first line bit is one low-speed clock plus up to one more while the
// serializer reaches its reload phase. This split follows the document.
module tx_device #(
  parameter int unsigned RATIO = 10
) (
  input  logic       clk,
  input  logic       clk_ser,
  input  logic       rst_n,
  input  logic       tx_k,
  input  logic [7:0] tx_data,
  output logic       ser_out
);
  logic [9:0] code;

  enc_8b10b u_pcs (
    .clk, .rst_n, .en(1'b1), .k(tx_k), .din(tx_data), .code, .rd()
  );

  serializer #(.RATIO(RATIO)) u_pma (
    .clk_ser, .rst_n, .par_in(code), .ser_out
  );
endmodule
