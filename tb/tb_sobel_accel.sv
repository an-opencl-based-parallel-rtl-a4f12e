// tb_sobel_accel: end-to-end test of the edge detector on small frames with
// random memory stalls; see sobel_accel_harness for what is checked.
module tb_sobel_accel;
  sobel_accel_harness #(.FULL(1'b0)) h ();
endmodule
