// packet_queues: the queues power domain, shared between the network layer
// (microcontroller side, "net") and the data-link layer ("dll").
//
// Holding the packet buffers in a small domain of their own lets the large
// microcontroller domain and the DLL domain each sleep while the other one
// works on a packet. The TX queue is written by the network layer and read by
// the DLL; the RX queue is written by the DLL and read by the network layer.
// Both are packet_queue instances of DEPTH bytes (1 kB each, as in the
// published design); the pairing of sides and queues follows its TX/RX
// description, the port signals are this implementation's choices. Timing is that of
// packet_queue: one-cycle read latency, writes take effect at the edge.
module packet_queues #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // network-layer side
  input  logic                   net_tx_wr,
  input  logic [7:0]             net_tx_data,
  output logic                   net_tx_full,
  input  logic                   net_rx_rd,
  output logic [7:0]             net_rx_data,
  output logic                   net_rx_empty,
  // data-link-layer side
  input  logic                   dll_tx_rd,
  output logic [7:0]             dll_tx_data,
  output logic                   dll_tx_empty,
  input  logic                   dll_rx_wr,
  input  logic [7:0]             dll_rx_data,
  output logic                   dll_rx_full,
  // fill levels
  output logic [$clog2(DEPTH):0] tx_level,
  output logic [$clog2(DEPTH):0] rx_level
);

  packet_queue #(.DEPTH(DEPTH), .W(8)) u_tx (
    .clk, .rst_n,
    .wr_en(net_tx_wr), .wr_data(net_tx_data), .full(net_tx_full),
    .rd_en(dll_tx_rd), .rd_data(dll_tx_data), .empty(dll_tx_empty),
    .level(tx_level)
  );

  packet_queue #(.DEPTH(DEPTH), .W(8)) u_rx (
    .clk, .rst_n,
    .wr_en(dll_rx_wr), .wr_data(dll_rx_data), .full(dll_rx_full),
    .rd_en(net_rx_rd), .rd_data(net_rx_data), .empty(net_rx_empty),
    .level(rx_level)
  );

endmodule
