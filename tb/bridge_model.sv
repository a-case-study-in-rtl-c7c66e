// bridge_model: behavioural model of the chip-to-chip bridge for the
// testbenches. Delivers each word LAT clocks after it was sent, in order,
// without loss. It stands in for the board's inter-FPGA link, which the
// accelerator uses but does not design.
module bridge_model #(
  parameter int unsigned WIDTH = 218,
  parameter int unsigned LAT   = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_valid,
  input  logic [WIDTH-1:0] tx_data,
  output logic             rx_valid,
  output logic [WIDTH-1:0] rx_data
);
  logic             v [LAT];
  logic [WIDTH-1:0] d [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < LAT; k++) v[k] <= 1'b0;
    else begin
      v[0] <= tx_valid;
      for (int k = 1; k < LAT; k++) v[k] <= v[k-1];
    end
  end
  always_ff @(posedge clk) begin
    d[0] <= tx_data;
    for (int k = 1; k < LAT; k++) d[k] <= d[k-1];
  end
  assign rx_valid = v[LAT-1];
  assign rx_data  = d[LAT-1];
endmodule
