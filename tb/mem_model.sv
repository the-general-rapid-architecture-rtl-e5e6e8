// mem_model: behavioural model of the memory attached to a Rapid array.
// Not synthesizable. NP ports, each a request with valid/ready and in-order
// read responses LAT cycles after acceptance. `ready` is random when
// RANDOM_READY is set, and low on any port whose `hold` bit is set. All ports share one 32K-word store, initialised to
// init_word(addr) so that tests can predict read data.
module mem_model #(
  parameter int NP = 1,
  parameter int LAT = 2,
  parameter bit RANDOM_READY = 1
) (
  input  logic              clk,
  input  logic [NP-1:0]     hold,    // force ready low on a port
  input  logic [NP-1:0]     req,
  input  logic [NP-1:0]     we,
  input  logic [NP-1:0][15:0] addr,
  input  logic [NP-1:0][15:0] wdata,
  output logic [NP-1:0]     ready,
  output logic [NP-1:0]     rvalid,
  output logic [NP-1:0][15:0] rdata
);
  logic [15:0] store [32768];
  logic [LAT-1:0]      vpipe [NP];
  logic [15:0]         dpipe [NP][LAT];

  function automatic logic [15:0] init_word(logic [15:0] a);
    return a * 16'd3 + 16'h0101;
  endfunction

  initial begin
    for (int i = 0; i < 32768; i++) store[i] = init_word(16'(i));
    for (int p = 0; p < NP; p++) vpipe[p] = '0;
    ready = '0;
  end

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      logic acc;
      acc = req[p] && ready[p];
      vpipe[p] <= {vpipe[p][LAT-2:0], acc && !we[p]};
      for (int k = LAT - 1; k > 0; k--) dpipe[p][k] <= dpipe[p][k-1];
      dpipe[p][0] <= store[addr[p][14:0]];
      if (acc && we[p]) store[addr[p][14:0]] <= wdata[p];
    end
  end

  always @(posedge clk) #0.5 for (int p = 0; p < NP; p++)
    ready[p] = !hold[p] && (RANDOM_READY ? ($urandom_range(0, 3) != 0) : 1'b1);

  always_comb for (int p = 0; p < NP; p++) begin
    rvalid[p] = vpipe[p][LAT-1];
    rdata[p]  = dpipe[p][LAT-1];
  end
endmodule
