// 4p-SAD: sum of absolute differences of four current/reference pixel pairs.
// Purely combinational; it is the basic processing element from which every
// IME search point module is composed (four of them make one 4x4 row SAD).
module sad4p
  import h264_pkg::*;
(
  input  pixel_t     cur [4],
  input  pixel_t     ref_px [4],
  output logic [9:0] sad
);
  always_comb begin
    sad = '0;
    for (int i = 0; i < 4; i++)
      sad += 10'(cur[i] > ref_px[i] ? cur[i] - ref_px[i] : ref_px[i] - cur[i]);
  end
endmodule
