// bbme_bin_pe: binarization processing element of the BBME pre-processor.
//
// Low-pass filters a pixel with the 3x3 kernel H_A = 1/4 [0 1 0; 1 0 1;
// 0 1 0] (the mean of its four direct neighbours, (sum + 1) >> 2 with the +1
// as rounding control) and compares: the binary pixel is 1 when the pixel is
// greater than or equal to the filtered value. Combinational.
module bbme_bin_pe (
  input  logic [7:0] pix,
  input  logic [7:0] up,
  input  logic [7:0] down,
  input  logic [7:0] left,
  input  logic [7:0] right,
  output logic       bin
);

  logic [9:0] sum;
  logic [7:0] filt;

  always_comb begin
    sum  = 10'(up) + 10'(down) + 10'(left) + 10'(right) + 10'd1;
    filt = 8'(sum >> 2);
    bin  = (pix >= filt);
  end

endmodule
