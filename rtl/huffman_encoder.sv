// huffman_encoder: Huffman encoder for blocks of sensor samples. A block of
// up to DIM_DEPTH 32-bit samples is received, the frequency and then the
// probability of each distinct sample value is computed, the Huffman tree
// of those probabilities is built and a code word is produced for every
// distinct value, so that frequent values get short codes.
//
// The five modules run one after another under the sequencer below:
//   data retriever (huff_dr)           -> DIM
//   frequency calculator (huff_fc)     DIM -> ADM (symbols), FADM (counts)
//   probability calculator (huff_pc)   FADM counts -> FADM probabilities
//   Huffman tree generator (huff_htg)  FADM -> LPM/LPCM/NAPM/NPCM/PNPM
//   Huffman code generator (huff_hcg)  tree -> HCM (code words)
// The sequencer and the bus multiplexing between modules are the glue the
// document counts as "others"; how it is done is this design's choice.
//
// Interface. start (pulse, while idle) opens a block; in_ready is then high
// and one sample per cycle is taken when in_valid is high; in_last marks the
// block's final sample. The encoder then runs without further input and
// pulses done; busy is high from start to done. Afterwards the code table
// is read through tbl_addr (0 .. num_symbols-1, combinational): the sample
// value, its probability (1.0 = 2**PROB_FRAC) and its code word (code
// right-aligned, first bit most significant, code_len bits). The table
// stays valid until the next start. cyc_* give the clock cycles each module
// took for the last block (cyc_dr counts from start to the last sample).
// overflow: more than DIM_DEPTH samples or ADM_DEPTH distinct values were
// presented; the excess was left out of the table.
//
// Beside the encoder sits the decoder (huff_dec), which reads a serial code
// bit stream (dec_bit_valid/dec_bit/dec_bit_ready, first code bit first)
// and returns sample values (dec_sym_valid/dec_symbol) using the table of
// the last encoded block. It takes bits only while the encoder is idle, and
// while it compares a bit against the table it borrows the table port, so
// the tbl_* outputs show the decoder's entry then. Sharing the table this
// way is this design's choice.
//
// The probability register of the PC and the probability read-outs of the
// tree generator's leaf and node memories are left unconnected here; they
// are kept in those modules for observation and testing.
module huffman_encoder
  import huff_pkg::*;
#(
  parameter int unsigned N_DEPTH = DIM_DEPTH,
  parameter int unsigned K_DEPTH = ADM_DEPTH,
  localparam int unsigned NAW    = $clog2(N_DEPTH),
  localparam int unsigned KAW    = $clog2(K_DEPTH),
  localparam int unsigned FAW    = $clog2(2048 * 8 / FADM_W) // 16-bit x 2 kbyte
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                in_ready,
  input  logic                in_valid,
  input  logic [DATA_W-1:0]   in_data,
  input  logic                in_last,
  output logic                busy,
  output logic                done,
  output logic                overflow,
  output logic [NAW:0]        num_samples,
  output logic [KAW:0]        num_symbols,
  input  logic [KAW-1:0]      tbl_addr,
  output logic [DATA_W-1:0]   tbl_symbol,
  output logic [FADM_W-1:0]   tbl_prob,
  output logic [LEN_W-1:0]    tbl_code_len,
  output logic [CODE_W-1:0]   tbl_code,
  output logic [31:0]         cyc_dr,
  output logic [31:0]         cyc_fc,
  output logic [31:0]         cyc_pc,
  output logic [31:0]         cyc_htg,
  output logic [31:0]         cyc_hcg,
  // decoder, using the code table of the last block
  input  logic                dec_flush,
  input  logic                dec_bit_valid,
  input  logic                dec_bit,
  output logic                dec_bit_ready,
  output logic                dec_sym_valid,
  output logic [DATA_W-1:0]   dec_symbol,
  output logic                dec_error
);

  localparam int unsigned FADM_DEPTH = 1 << FAW;

  typedef enum logic [2:0] {P_IDLE, P_DR, P_FC, P_PC, P_HTG, P_HCG} phase_e;
  phase_e phase;

  // ---------------- module handshakes ----------------
  logic dr_done, fc_done, pc_done, htg_done, hcg_done;
  logic fc_busy, pc_busy, htg_busy, hcg_busy;
  logic dr_ovf, fc_ovf, hcg_ovf;
  logic fc_start, pc_start, htg_start, hcg_start;

  logic [NAW-1:0]  dim_addr;
  logic [DATA_W-1:0] dim_data;

  logic            fadm_we;
  logic [FAW-1:0]  fadm_addr;
  logic [FADM_W-1:0] fadm_wdata, fadm_rdata;
  logic            pc_fadm_we;
  logic [FAW-1:0]  pc_fadm_addr, htg_fadm_addr;
  logic [FADM_W-1:0] pc_fadm_wdata, pc_prob;

  logic [KAW-1:0]  leaf_addr, node_addr;
  logic [KAW-1:0]  leaf_sym, leaf_parent, node_parent;
  logic            leaf_bit, node_bit;
  logic [FADM_W-1:0] leaf_prob, node_prob;
  logic [HCM_W-1:0]  hcm_rdata;

  // table read port: the decoder while it scans, the outside otherwise
  logic            dec_scanning, dec_ready;
  logic [KAW-1:0]  dec_tbl_addr, tbl_raddr;
  assign tbl_raddr = dec_scanning ? dec_tbl_addr : tbl_addr;

  assign in_ready = (phase == P_DR);
  assign busy     = (phase != P_IDLE);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      fc_start  <= 1'b0;
      pc_start  <= 1'b0;
      htg_start <= 1'b0;
      hcg_start <= 1'b0;
      done      <= 1'b0;
      cyc_dr    <= '0;
      cyc_fc    <= '0;
      cyc_pc    <= '0;
      cyc_htg   <= '0;
      cyc_hcg   <= '0;
    end else begin
      fc_start  <= 1'b0;
      pc_start  <= 1'b0;
      htg_start <= 1'b0;
      hcg_start <= 1'b0;
      done      <= 1'b0;
      unique case (phase)
        P_IDLE: if (start) begin
          phase  <= P_DR;
          cyc_dr <= '0; cyc_fc <= '0; cyc_pc <= '0; cyc_htg <= '0; cyc_hcg <= '0;
        end
        P_DR: begin
          cyc_dr <= cyc_dr + 1;
          if (in_valid && in_last) phase <= P_FC;
        end
        P_FC: begin
          cyc_fc <= cyc_fc + 1;
          if (dr_done) fc_start <= 1'b1;
          if (fc_done) begin phase <= P_PC;  pc_start  <= 1'b1; end
        end
        P_PC: begin
          cyc_pc <= cyc_pc + 1;
          if (pc_done) begin phase <= P_HTG; htg_start <= 1'b1; end
        end
        P_HTG: begin
          cyc_htg <= cyc_htg + 1;
          if (htg_done) begin phase <= P_HCG; hcg_start <= 1'b1; end
        end
        P_HCG: begin
          cyc_hcg <= cyc_hcg + 1;
          if (hcg_done) begin phase <= P_IDLE; done <= 1'b1; end
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  // ---------------- data retriever ----------------
  huff_dr #(.DEPTH(N_DEPTH)) u_dr (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (phase == P_IDLE && start),
    .en       (phase == P_DR),
    .in_valid (in_valid),
    .in_data  (in_data),
    .in_last  (in_last),
    .done     (dr_done),
    .count    (num_samples),
    .overflow (dr_ovf),
    .rd_addr  (dim_addr),
    .rd_data  (dim_data)
  );

  // ---------------- frequency calculator ----------------
  // FADM bus: PC while it runs, HTG while it runs, table read-out otherwise
  always_comb begin
    fadm_we    = 1'b0;
    fadm_addr  = FAW'(tbl_raddr);
    fadm_wdata = pc_fadm_wdata;
    if (phase == P_PC) begin
      fadm_we   = pc_fadm_we;
      fadm_addr = pc_fadm_addr;
    end else if (phase == P_HTG) begin
      fadm_addr = htg_fadm_addr;
    end
  end

  huff_fc #(.N_DEPTH(N_DEPTH), .K_DEPTH(K_DEPTH), .FADM_DEPTH(FADM_DEPTH)) u_fc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (fc_start),
    .n_samples  (num_samples),
    .busy       (fc_busy),
    .done       (fc_done),
    .n_symbols  (num_symbols),
    .overflow   (fc_ovf),
    .dim_addr   (dim_addr),
    .dim_data   (dim_data),
    .adm_addr   (tbl_raddr),
    .adm_data   (tbl_symbol),
    .fadm_we    (fadm_we),
    .fadm_addr  (fadm_addr),
    .fadm_wdata (fadm_wdata),
    .fadm_rdata (fadm_rdata)
  );
  assign tbl_prob = fadm_rdata;

  // ---------------- probability calculator ----------------
  huff_pc #(.K_DEPTH(K_DEPTH), .N_DEPTH(N_DEPTH), .FADM_DEPTH(FADM_DEPTH)) u_pc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (pc_start),
    .n_symbols  (num_symbols),
    .n_samples  (num_samples),
    .busy       (pc_busy),
    .done       (pc_done),
    .prob_q     (pc_prob),
    .fadm_we    (pc_fadm_we),
    .fadm_addr  (pc_fadm_addr),
    .fadm_wdata (pc_fadm_wdata),
    .fadm_rdata (fadm_rdata)
  );

  // ---------------- Huffman tree generator ----------------
  huff_htg #(.K_DEPTH(K_DEPTH), .FADM_DEPTH(FADM_DEPTH)) u_htg (
    .clk             (clk),
    .rst_n           (rst_n),
    .start           (htg_start),
    .n_symbols       (num_symbols),
    .busy            (htg_busy),
    .done            (htg_done),
    .fadm_addr       (htg_fadm_addr),
    .fadm_rdata      (fadm_rdata),
    .ext_leaf_addr   (leaf_addr),
    .ext_leaf_sym    (leaf_sym),
    .ext_leaf_prob   (leaf_prob),
    .ext_leaf_parent (leaf_parent),
    .ext_leaf_bit    (leaf_bit),
    .ext_node_addr   (node_addr),
    .ext_node_prob   (node_prob),
    .ext_node_parent (node_parent),
    .ext_node_bit    (node_bit)
  );

  // ---------------- Huffman code generator ----------------
  huff_hcg #(.K_DEPTH(K_DEPTH)) u_hcg (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (hcg_start),
    .n_symbols   (num_symbols),
    .busy        (hcg_busy),
    .done        (hcg_done),
    .code_ovf    (hcg_ovf),
    .leaf_addr   (leaf_addr),
    .leaf_sym    (leaf_sym),
    .leaf_parent (leaf_parent),
    .leaf_bit    (leaf_bit),
    .node_addr   (node_addr),
    .node_parent (node_parent),
    .node_bit    (node_bit),
    .hcm_raddr   (tbl_raddr),
    .hcm_rdata   (hcm_rdata)
  );

  assign tbl_code_len = hcm_rdata[HCM_W-1 -: LEN_W];
  assign tbl_code     = hcm_rdata[CODE_W-1:0];
  assign overflow     = dr_ovf || fc_ovf || hcg_ovf;

  // ---------------- decoder ----------------
  huff_dec #(.K_DEPTH(K_DEPTH)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .n_symbols  (num_symbols),
    .flush      (dec_flush),
    .bit_valid  (dec_bit_valid && !busy),
    .bit_in     (dec_bit),
    .bit_ready  (dec_ready),
    .sym_valid  (dec_sym_valid),
    .sym_data   (dec_symbol),
    .error      (dec_error),
    .scanning   (dec_scanning),
    .tbl_addr   (dec_tbl_addr),
    .tbl_symbol (tbl_symbol),
    .tbl_len    (tbl_code_len),
    .tbl_code   (tbl_code)
  );
  assign dec_bit_ready = dec_ready && !busy;

  // the phases never overlap: only one module may own the shared buses
  property p_one_owner;
    @(posedge clk) disable iff (!rst_n)
      $onehot0({fc_busy, pc_busy, htg_busy, hcg_busy});
  endproperty
  a_one_owner: assert property (p_one_owner);

endmodule
