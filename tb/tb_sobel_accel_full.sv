// tb_sobel_accel_full: end-to-end test of the edge detector with every
// parameter at its default, on the nine image sizes from 144x256 to
// 3480x5760 pixels; see sobel_accel_harness for what is checked.
module tb_sobel_accel_full;
  sobel_accel_harness #(.FULL(1'b1)) h ();
endmodule
