// cordic_pipe: pipelined reconfigurable CORDIC unit for basic-shift BSHIFT.
//
// NSTAGE = n_stage(BSHIFT) cordic_stage instances in a chain (14 for
// basic-shift 2, 17 for 3). Each is an RCCU with its own hardwired shift index
// (the basic-shift 2^BSHIFT - 1 times, then one stage per larger index)
// followed by a register. The same chain serves rotation and vectoring mode
// and both trajectories: mode and trajectory travel with every record, so
// consecutive records may use different ones. Latency NSTAGE clocks, one
// record per clock, no stalls. The pipelined unit for basic-shift 2, its
// extension to 3 and the hardwired shifts follow the source architecture; the
// stage sequence and a register after every stage are this design's choices.
module cordic_pipe
  import cordic_pkg::*;
#(
  parameter int BSHIFT = BASIC_SHIFT   // 2 (default) or 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  stage_t st_i,
  output stage_t st_o
);
  localparam int NST = n_stage(BSHIFT);

  stage_t chain [NST+1];

  assign chain[0] = st_i;

  for (genvar i = 0; i < NST; i++) begin : g_stage
    cordic_stage #(.IDX(i), .BSHIFT(BSHIFT)) u_stage (
      .clk(clk), .rst_n(rst_n), .st_i(chain[i]), .st_o(chain[i+1])
    );
  end

  assign st_o = chain[NST];
endmodule
