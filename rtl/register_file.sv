// register_file: one of the three GAPPCO register files (input data,
// intermediate results, output results).
//
// N_WORDS words of DATA_W bits, all visible at once on rd_all so that the
// routing matrices can read any of them in the same cycle. Two write ports:
//  - a host port that writes one word (host_we, host_addr, host_wdata), used
//    by the bus interface to fill the input file;
//  - a parallel port that writes every word at once (par_we, par_wdata),
//    used by a row of Dot Vectors units to store its results.
// When both write in one cycle the parallel port wins. host_rdata reads word
// host_addr combinationally. All words reset to +0.0.
// The three files and their roles come from the block diagram; their sizes
// and port structure are this design's choices.
module register_file #(
  parameter int unsigned N_WORDS = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ADDR_W  = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            host_we,
  input  logic [ADDR_W-1:0]               host_addr,
  input  logic [DATA_W-1:0]               host_wdata,
  output logic [DATA_W-1:0]               host_rdata,
  input  logic                            par_we,
  input  logic [N_WORDS-1:0][DATA_W-1:0]  par_wdata,
  output logic [N_WORDS-1:0][DATA_W-1:0]  rd_all
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rd_all <= '0;
    else if (par_we)
      rd_all <= par_wdata;
    else if (host_we && (32'(host_addr) < N_WORDS))
      rd_all[host_addr] <= host_wdata;
  end

  assign host_rdata = (32'(host_addr) < N_WORDS) ? rd_all[host_addr] : '0;
endmodule
