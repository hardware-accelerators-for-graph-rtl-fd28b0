// sdma_cmd_decoder: front end of the sparse DMA for the two custom instructions.
//
// The sparse-config instruction (funct FN_SPARSE_CONFIG) stores the byte addresses
// of the COO value array (rs1) and of the COO index array (rs2). The sparse-mvin
// instruction (funct FN_MVIN_SPARSE_COO) is split into its fields as the
// documented algorithm does: rs2[31] selects the accumulator, rs2[30] requests
// accumulation, rs2[28:0] is the local base row, rs2[47:32] the number of columns,
// rs2[63:48] the number of rows; rs1[15:0] is the first column and rs1[31:16] the
// first row. Together with the stored addresses this forms a job_t, which is held
// in a one-entry register until the expander takes it (valid/ready).
//
// Every mvin starts from the configured addresses: as in the documented algorithm
// the walk through the arrays does not write the advanced pointers back. Which
// operand carries which field and the funct codes are this design's choice; an
// instruction with any other funct is accepted and ignored.
//
// Timing: a config instruction is taken every cycle; an mvin is taken when the job
// register is empty or emptied in the same cycle, and its job is offered from the
// next cycle on.
module sdma_cmd_decoder
  import sdma_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // instruction stream
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [6:0]      cmd_funct,
  input  logic [XLEN-1:0] cmd_rs1,
  input  logic [XLEN-1:0] cmd_rs2,
  // decoded job
  output logic            job_valid,
  input  logic            job_ready,
  output job_t            job
);

  logic [XLEN-1:0] data_addr_q, index_addr_q;
  logic            is_cfg, is_mvin;

  assign is_cfg  = cmd_funct == FN_SPARSE_CONFIG;
  assign is_mvin = cmd_funct == FN_MVIN_SPARSE_COO;

  assign cmd_ready = !is_mvin || !job_valid || job_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_addr_q  <= '0;
      index_addr_q <= '0;
      job_valid    <= 1'b0;
      job          <= '0;
    end else begin
      if (job_valid && job_ready) job_valid <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        if (is_cfg) begin
          data_addr_q  <= cmd_rs1;
          index_addr_q <= cmd_rs2;
        end
        if (is_mvin) begin
          job       <= decode_mvin(data_addr_q, index_addr_q, cmd_rs1, cmd_rs2);
          job_valid <= 1'b1;
        end
      end
    end
  end

  // A job on offer must stay stable until it is taken.
  a_job_stable: assert property (@(posedge clk) disable iff (!rst_n)
    job_valid && !job_ready |=> job_valid && $stable(job));

endmodule
