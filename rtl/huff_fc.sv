// huff_fc: frequency calculator (FC). Counts how often each distinct symbol
// occurs among the N samples held in DIM and stores the distinct symbols in
// the arranged data memory (ADM, 32-bit x 2 kbyte) and their counts in the
// frequency arranged data memory (FADM, 16-bit) at the same address.
//
// How it works, following the architecture: the first not yet counted
// datum is loaded into the data comparator; the address counter then runs
// over the samples from that datum to the end, and on every match the
// identifier increments the data counter and marks the sample as counted.
// The first unmarked, non-matching sample seen during the pass becomes the
// next comparator value. When a pass ends, the symbol is written to ADM and
// its count to FADM at the next address. The count is formed with the ALU's
// summation. The per-sample "counted" marks are a flag register of this
// design; the document does not say how repeated symbols are skipped.
//
// Timing: one cycle to load the comparator, N - i cycles for a pass that
// starts at sample i, one cycle to write; about K*N/2 cycles for K symbols
// spread evenly. done pulses one cycle after the last write.
//
// Interface: start (pulse) with n_samples valid. The DIM is read through
// dim_addr/dim_data. When idle, the FADM read/write port and the ADM read
// port are handed to the outside (probability calculator, tree generator,
// result read-out). More than ADM_DEPTH distinct symbols set overflow and
// end the count with the first ADM_DEPTH symbols.
module huff_fc
  import huff_pkg::*;
#(
  parameter int unsigned DW         = DATA_W,
  parameter int unsigned N_DEPTH    = DIM_DEPTH,
  parameter int unsigned K_DEPTH    = ADM_DEPTH,
  parameter int unsigned FW         = FADM_W,
  parameter int unsigned FADM_DEPTH = 1024,
  localparam int unsigned NAW       = $clog2(N_DEPTH),
  localparam int unsigned KAW       = $clog2(K_DEPTH),
  localparam int unsigned FAW       = $clog2(FADM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NAW:0]    n_samples,
  output logic            busy,
  output logic            done,
  output logic [KAW:0]    n_symbols,
  output logic            overflow,
  // DIM read port
  output logic [NAW-1:0]  dim_addr,
  input  logic [DW-1:0]   dim_data,
  // ADM read port (outside, when idle)
  input  logic [KAW-1:0]  adm_addr,
  output logic [DW-1:0]   adm_data,
  // FADM port (outside, when idle)
  input  logic            fadm_we,
  input  logic [FAW-1:0]  fadm_addr,
  input  logic [FW-1:0]   fadm_wdata,
  output logic [FW-1:0]   fadm_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_WRITE, S_DONE} state_e;
  state_e state;

  logic [DW-1:0]   cmp_q;        // data comparator register
  logic [NAW-1:0]  cand_idx;     // sample the comparator was loaded from
  logic [NAW-1:0]  scan_idx;     // address counter over DIM
  logic [FW-1:0]   cnt_q;        // data counter
  logic [NAW-1:0]  next_idx;
  logic            next_found;
  logic [N_DEPTH-1:0] counted;   // per-sample "already counted" marks
  logic [FW-1:0]   cnt_inc;

  logic            match;
  assign match = (dim_data == cmp_q) && !counted[scan_idx];

  huff_alu #(.W(FW)) u_alu (
    .op (ALU_ADD),
    .a  (cnt_q),
    .b  (FW'(1)),
    .y  (cnt_inc)
  );

  logic last_scan;
  assign last_scan = ({1'b0, scan_idx} == n_samples - 1'b1);

  assign busy     = (state != S_IDLE);
  assign dim_addr = (state == S_LOAD) ? cand_idx : scan_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmp_q      <= '0;
      cand_idx   <= '0;
      scan_idx   <= '0;
      cnt_q      <= '0;
      next_idx   <= '0;
      next_found <= 1'b0;
      counted    <= '0;
      n_symbols  <= '0;
      overflow   <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          counted   <= '0;
          cand_idx  <= '0;
          n_symbols <= '0;
          overflow  <= 1'b0;
          state     <= (n_samples == '0) ? S_DONE : S_LOAD;
        end
        S_LOAD: begin
          cmp_q      <= dim_data;
          scan_idx   <= cand_idx;
          cnt_q      <= '0;
          next_found <= 1'b0;
          state      <= S_SCAN;
        end
        S_SCAN: begin
          if (match) begin
            cnt_q             <= cnt_inc;
            counted[scan_idx] <= 1'b1;
          end else if (!counted[scan_idx] && !next_found) begin
            next_idx   <= scan_idx;
            next_found <= 1'b1;
          end
          if (last_scan) state <= S_WRITE;
          else           scan_idx <= scan_idx + 1'b1;
        end
        S_WRITE: begin
          n_symbols <= n_symbols + 1'b1;
          if (!next_found) begin
            state <= S_DONE;
          end else if (n_symbols == (KAW+1)'(K_DEPTH - 1)) begin
            overflow <= 1'b1;
            state    <= S_DONE;
          end else begin
            cand_idx <= next_idx;
            state    <= S_LOAD;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ADM / FADM: written by the pass that just ended, else owned outside
  logic write_now;
  assign write_now = (state == S_WRITE);

  huff_ram #(.WIDTH(DW), .DEPTH(K_DEPTH)) u_adm (
    .clk   (clk),
    .we    (write_now),
    .waddr (n_symbols[KAW-1:0]),
    .wdata (cmp_q),
    .raddr (adm_addr),
    .rdata (adm_data)
  );

  huff_ram #(.WIDTH(FW), .DEPTH(FADM_DEPTH)) u_fadm (
    .clk   (clk),
    .we    (write_now || (!busy && fadm_we)),
    .waddr (write_now ? FAW'(n_symbols[KAW-1:0]) : fadm_addr),
    .wdata (write_now ? cnt_q : fadm_wdata),
    .raddr (fadm_addr),
    .rdata (fadm_rdata)
  );

endmodule
