// sobel_stream_if: one valid/ready link of the pipeline (a kernel output, a
// channel input or output). A word passes when valid && ready at a rising
// clock edge. The source must keep valid high and data stable until the word
// has passed; the interface checks that rule on every link it is used for.
// Modports: src for the side that drives valid/data, snk for the side that
// drives ready, mon for observers.
interface sobel_stream_if #(
  parameter int unsigned WIDTH = 64
) (
  input logic clk,
  input logic rst_n
);
  logic             valid;
  logic             ready;
  logic [WIDTH-1:0] data;

  modport src (output valid, output data, input ready);
  modport snk (input valid, input data, output ready);
  modport mon (input valid, input data, input ready);

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && !ready) |=> (valid && $stable(data)))
    else $error("sobel_stream_if: word withdrawn or changed before it was taken");

endinterface
