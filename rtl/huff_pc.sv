// huff_pc: probability calculator (PC). Turns every symbol frequency in FADM
// into a probability, P(i) = f(i) / N, and overwrites the frequency with it.
//
// An address counter walks FADM from address 0 to n_symbols-1; each cycle
// the frequency read there goes to the ALU, which divides f(i) * 2**PROB_FRAC
// by the sample count N; the quotient is captured in the probability
// register and written back to FADM at the same address in that same cycle.
// The fixed-point scaling (PROB_FRAC fraction bits, truncating division) is
// this design's choice: the document gives the equation, not the number
// format.
//
// Timing: start (pulse) -> n_symbols cycles of one division each -> done
// pulses in the following cycle. prob_q holds the last probability.
module huff_pc
  import huff_pkg::*;
#(
  parameter int unsigned K_DEPTH    = ADM_DEPTH,
  parameter int unsigned N_DEPTH    = DIM_DEPTH,
  parameter int unsigned FW         = FADM_W,
  parameter int unsigned FRAC       = PROB_FRAC,
  parameter int unsigned FADM_DEPTH = 1024,
  localparam int unsigned KAW       = $clog2(K_DEPTH),
  localparam int unsigned NAW       = $clog2(N_DEPTH),
  localparam int unsigned FAW       = $clog2(FADM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KAW:0]   n_symbols,
  input  logic [NAW:0]   n_samples,
  output logic           busy,
  output logic           done,
  output logic [FW-1:0]  prob_q,
  // FADM port
  output logic           fadm_we,
  output logic [FAW-1:0] fadm_addr,
  output logic [FW-1:0]  fadm_wdata,
  input  logic [FW-1:0]  fadm_rdata
);

  localparam int unsigned AW = 32; // ALU word

  logic [KAW:0]  addr_q;
  logic          run;
  logic [AW-1:0] quot;

  huff_alu #(.W(AW)) u_alu (
    .op (ALU_DIV),
    .a  (AW'(fadm_rdata) << FRAC),
    .b  (AW'(n_samples)),
    .y  (quot)
  );

  assign busy       = run;
  assign fadm_addr  = FAW'(addr_q);
  assign fadm_we    = run;
  assign fadm_wdata = FW'(quot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run    <= 1'b0;
      addr_q <= '0;
      prob_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          addr_q <= '0;
          if (n_symbols == '0) done <= 1'b1;
          else                 run  <= 1'b1;
        end
      end else begin
        prob_q <= FW'(quot);
        if (addr_q == n_symbols - 1'b1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          addr_q <= addr_q + 1'b1;
        end
      end
    end
  end

endmodule
