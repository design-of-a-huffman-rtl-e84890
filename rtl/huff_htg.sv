// huff_htg: Huffman tree generator (HTG). Builds the Huffman tree of the
// n_symbols probabilities held in FADM and stores it, by memory mapping,
// in leaf and node memories read later by the code generator.
//
// Three phases, all run by one address-counter state machine:
//  1. Sort. Each probability read from FADM passes the probabilities
//     comparator, which searches the arranged probabilities memory (APM,
//     ascending). A value not yet present is inserted in order (the entries
//     above it move up one place, one per cycle) with a count of 1 in the
//     frequency arranged probabilities memory (FAPM); a repeated value only
//     has its FAPM count incremented by the identifier.
//  2. Leaves. For each APM entry, lowest first, FADM is scanned for the
//     symbols having that probability until FAPM's count of them is found;
//     each becomes the next leaf in the leaf probabilities memory (LPM,
//     {symbol address, probability}), so the leaves are in ascending order.
//  3. Merge. The two lowest probabilities among the next unused leaf and
//     the next unused internal node are added by the ALU; the sum is the
//     next internal node in the new added probabilities memory (NAPM).
//     Sums never decrease, so NAPM is itself sorted and the two lowest are
//     always at the heads of LPM and NAPM. The first (lower) child gets
//     branch bit 0 and the second (higher) bit 1, as the document assigns
//     them. A leaf's parent node and bit go to the leaf probabilities
//     connectors memory (LPCM); an internal node's bit goes to the nodes
//     probabilities connectors memory (NPCM) and its parent to the parent
//     nodes probabilities memory (PNPM). With K leaves there are K-1
//     internal nodes and node K-2 is the root. On equal probabilities a leaf
//     is taken before a node.
// The document names these memories and the comparator/identifier/counter
// parts but not their exact contents or the search order; the contents
// above, the two-queue merge, and holding node probabilities in NAPM alone
// (the document's NPM is the same memory here) are this design's choices.
// A single symbol (K = 1) gives one leaf, bit 0, and no internal node.
//
// Timing: start (pulse) -> done (pulse). Sort takes about K*M/2 cycles for
// M distinct probabilities, leaves about M*K/2, merge 2*(K-1).
// Interface: FADM is read through fadm_addr/fadm_rdata while busy; when idle
// the leaf and node memories are read through the ext_* ports (same cycle).
module huff_htg
  import huff_pkg::*;
#(
  parameter int unsigned K_DEPTH    = ADM_DEPTH,
  parameter int unsigned FW         = FADM_W,
  parameter int unsigned FADM_DEPTH = 1024,
  localparam int unsigned KAW       = $clog2(K_DEPTH),
  localparam int unsigned FAW       = $clog2(FADM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KAW:0]   n_symbols,
  output logic           busy,
  output logic           done,
  // FADM read port
  output logic [FAW-1:0] fadm_addr,
  input  logic [FW-1:0]  fadm_rdata,
  // leaf memories (LPM, LPCM), read when idle
  input  logic [KAW-1:0] ext_leaf_addr,
  output logic [KAW-1:0] ext_leaf_sym,
  output logic [FW-1:0]  ext_leaf_prob,
  output logic [KAW-1:0] ext_leaf_parent,
  output logic           ext_leaf_bit,
  // node memories (NAPM, NPCM, PNPM), read when idle
  input  logic [KAW-1:0] ext_node_addr,
  output logic [FW-1:0]  ext_node_prob,
  output logic [KAW-1:0] ext_node_parent,
  output logic           ext_node_bit
);

  localparam int unsigned CW = KAW + 1; // FAPM count width

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_SRCH, S_SHIFT, S_LSTART, S_LSCAN,
    S_BINIT, S_PICK0, S_PICK1, S_DONE
  } state_e;
  state_e state;

  logic [KAW:0]   k_q;      // FADM address counter (sort) / scan (leaves)
  logic [KAW:0]   m_q;      // number of APM entries
  logic [KAW:0]   j_q;      // APM address counter
  logic [KAW:0]   s_q;      // shift pointer
  logic [FW-1:0]  p_q;      // probability in the comparator
  logic [CW-1:0]  need_q;   // leaves still to find for APM[j]
  logic [KAW:0]   l_q;      // leaves written
  logic [KAW:0]   lh_q;     // next unused leaf
  logic [KAW:0]   nh_q;     // next unused node
  logic [KAW:0]   t_q;      // nodes created
  logic [FW-1:0]  c0_q;     // probability of the first child

  // ---------------- memories ----------------
  logic           apm_we;   logic [KAW-1:0] apm_wa, apm_ra;
  logic [FW-1:0]  apm_wd, apm_rd;
  logic           fapm_we;
  logic [CW-1:0]  fapm_wd, fapm_rd;
  logic           lpm_we;   logic [KAW-1:0] lpm_wa, lpm_ra;
  logic [KAW+FW-1:0] lpm_wd, lpm_rd;
  logic           lpcm_we;  logic [KAW-1:0] lpcm_wa;
  logic [KAW:0]   lpcm_wd, lpcm_rd;
  logic           napm_we;  logic [KAW-1:0] napm_wa, napm_ra;
  logic [FW-1:0]  napm_wd, napm_rd;
  logic           ncm_we;   logic [KAW-1:0] ncm_wa;
  logic           npcm_wd, npcm_rd;
  logic [KAW-1:0] pnpm_wd, pnpm_rd;

  huff_ram #(.WIDTH(FW), .DEPTH(K_DEPTH)) u_apm (
    .clk(clk), .we(apm_we), .waddr(apm_wa), .wdata(apm_wd),
    .raddr(apm_ra), .rdata(apm_rd));
  huff_ram #(.WIDTH(CW), .DEPTH(K_DEPTH)) u_fapm (
    .clk(clk), .we(fapm_we), .waddr(apm_wa), .wdata(fapm_wd),
    .raddr(apm_ra), .rdata(fapm_rd));
  huff_ram #(.WIDTH(KAW+FW), .DEPTH(K_DEPTH)) u_lpm (
    .clk(clk), .we(lpm_we), .waddr(lpm_wa), .wdata(lpm_wd),
    .raddr(lpm_ra), .rdata(lpm_rd));
  huff_ram #(.WIDTH(KAW+1), .DEPTH(K_DEPTH)) u_lpcm (
    .clk(clk), .we(lpcm_we), .waddr(lpcm_wa), .wdata(lpcm_wd),
    .raddr(ext_leaf_addr), .rdata(lpcm_rd));
  huff_ram #(.WIDTH(FW), .DEPTH(K_DEPTH)) u_napm (
    .clk(clk), .we(napm_we), .waddr(napm_wa), .wdata(napm_wd),
    .raddr(napm_ra), .rdata(napm_rd));
  huff_ram #(.WIDTH(1), .DEPTH(K_DEPTH)) u_npcm (
    .clk(clk), .we(ncm_we), .waddr(ncm_wa), .wdata(npcm_wd),
    .raddr(ext_node_addr), .rdata(npcm_rd));
  huff_ram #(.WIDTH(KAW), .DEPTH(K_DEPTH)) u_pnpm (
    .clk(clk), .we(ncm_we), .waddr(ncm_wa), .wdata(pnpm_wd),
    .raddr(ext_node_addr), .rdata(pnpm_rd));

  assign ext_leaf_sym    = lpm_rd[KAW+FW-1:FW];
  assign ext_leaf_prob   = lpm_rd[FW-1:0];
  assign ext_leaf_parent = lpcm_rd[KAW:1];
  assign ext_leaf_bit    = lpcm_rd[0];
  assign ext_node_prob   = napm_rd;
  assign ext_node_parent = pnpm_rd;
  assign ext_node_bit    = npcm_rd;

  // ---------------- ALU: counts and sums ----------------
  logic [FW-1:0] alu_a, alu_b, alu_y;
  alu_op_e       alu_op;
  huff_alu #(.W(FW)) u_alu (.op(alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  // ---------------- merge selection ----------------
  logic          leaf_avail, node_avail, take_leaf;
  logic [FW-1:0] pick_prob;
  assign leaf_avail = (lh_q < n_symbols);
  assign node_avail = (nh_q < t_q);
  assign take_leaf  = leaf_avail && (!node_avail || (lpm_rd[FW-1:0] <= napm_rd));
  assign pick_prob  = take_leaf ? lpm_rd[FW-1:0] : napm_rd;

  // ---------------- comparator ----------------
  logic apm_end, apm_eq, apm_gt;
  assign apm_end = (j_q == m_q);
  assign apm_eq  = (apm_rd == p_q);
  assign apm_gt  = (apm_rd >  p_q);

  logic leaf_hit;
  assign leaf_hit = (fadm_rdata == p_q);

  assign busy = (state != S_IDLE);

  // read addresses and write strobes
  always_comb begin
    fadm_addr = FAW'(k_q);
    apm_ra    = (state == S_SHIFT) ? KAW'(s_q - 1'b1) : KAW'(j_q);
    lpm_ra    = busy ? KAW'(lh_q) : ext_leaf_addr;
    napm_ra   = busy ? KAW'(nh_q) : ext_node_addr;

    apm_we  = 1'b0;  fapm_we = 1'b0;
    apm_wa  = KAW'(j_q);
    apm_wd  = p_q;
    fapm_wd = CW'(1);
    lpm_we  = 1'b0;  lpm_wa = KAW'(l_q);
    lpm_wd  = {KAW'(k_q), p_q};
    lpcm_we = 1'b0;  lpcm_wa = KAW'(lh_q);
    lpcm_wd = {KAW'(t_q), (state == S_PICK1)};
    napm_we = 1'b0;  napm_wa = KAW'(t_q);
    napm_wd = alu_y;
    ncm_we  = 1'b0;  ncm_wa = KAW'(nh_q);
    npcm_wd = (state == S_PICK1);
    pnpm_wd = KAW'(t_q);
    alu_op  = ALU_ADD;
    alu_a   = c0_q;
    alu_b   = pick_prob;

    unique case (state)
      S_SRCH: begin
        if (apm_end) begin
          apm_we = 1'b1; fapm_we = 1'b1;           // append
        end else if (apm_eq) begin
          fapm_we = 1'b1;                          // repeated probability
          alu_a   = FW'(fapm_rd);
          alu_b   = FW'(1);
          fapm_wd = CW'(alu_y);
        end
      end
      S_SHIFT: begin
        apm_we = 1'b1; fapm_we = 1'b1;
        if (s_q == j_q) begin
          apm_wa = KAW'(j_q);                      // insert
        end else begin
          apm_wa  = KAW'(s_q);                     // move one up
          apm_wd  = apm_rd;
          fapm_wd = fapm_rd;
        end
      end
      S_LSCAN: begin
        lpm_we = leaf_hit;
        alu_op = ALU_SUB;
        alu_a  = FW'(need_q);
        alu_b  = FW'(1);
      end
      S_BINIT: begin
        // single symbol: one leaf, bit 0
        lpcm_we = (n_symbols == (KAW+1)'(1));
        lpcm_wa = '0;
        lpcm_wd = '0;
      end
      S_PICK0, S_PICK1: begin
        lpcm_we = take_leaf;
        ncm_we  = !take_leaf;
        napm_we = (state == S_PICK1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k_q    <= '0; m_q <= '0; j_q <= '0; s_q <= '0;
      p_q    <= '0; need_q <= '0; l_q <= '0;
      lh_q   <= '0; nh_q <= '0; t_q <= '0; c0_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_q   <= '0;
          m_q   <= '0;
          state <= (n_symbols == '0) ? S_DONE : S_FETCH;
        end
        // ---- sort ----
        S_FETCH: begin
          p_q   <= fadm_rdata;
          j_q   <= '0;
          state <= S_SRCH;
        end
        S_SRCH: begin
          if (apm_end || apm_eq) begin
            if (apm_end) m_q <= m_q + 1'b1;
            if (k_q == n_symbols - 1'b1) begin
              j_q   <= '0;
              l_q   <= '0;
              state <= S_LSTART;
            end else begin
              k_q   <= k_q + 1'b1;
              state <= S_FETCH;
            end
          end else if (apm_gt) begin
            s_q   <= m_q;
            state <= S_SHIFT;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        S_SHIFT: begin
          if (s_q == j_q) begin
            m_q <= m_q + 1'b1;
            if (k_q == n_symbols - 1'b1) begin
              j_q   <= '0;
              l_q   <= '0;
              state <= S_LSTART;
            end else begin
              k_q   <= k_q + 1'b1;
              state <= S_FETCH;
            end
          end else begin
            s_q <= s_q - 1'b1;
          end
        end
        // ---- leaves in ascending order ----
        S_LSTART: begin
          p_q    <= apm_rd;
          need_q <= fapm_rd;
          k_q    <= '0;
          state  <= S_LSCAN;
        end
        S_LSCAN: begin
          if (leaf_hit) begin
            l_q    <= l_q + 1'b1;
            need_q <= CW'(alu_y);
            if (need_q == CW'(1)) begin
              if (j_q == m_q - 1'b1) begin
                state <= S_BINIT;
              end else begin
                j_q   <= j_q + 1'b1;
                state <= S_LSTART;
              end
            end
          end
          k_q <= k_q + 1'b1;
        end
        // ---- merge ----
        S_BINIT: begin
          lh_q  <= '0;
          nh_q  <= '0;
          t_q   <= '0;
          state <= (n_symbols == (KAW+1)'(1)) ? S_DONE : S_PICK0;
        end
        S_PICK0: begin
          c0_q <= pick_prob;
          if (take_leaf) lh_q <= lh_q + 1'b1;
          else           nh_q <= nh_q + 1'b1;
          state <= S_PICK1;
        end
        S_PICK1: begin
          if (take_leaf) lh_q <= lh_q + 1'b1;
          else           nh_q <= nh_q + 1'b1;
          t_q <= t_q + 1'b1;
          if (t_q == n_symbols - (KAW+1)'(2)) state <= S_DONE;
          else                         state <= S_PICK0;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
