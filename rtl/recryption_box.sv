// recryption_box: the arithmetic processor of the FV recryption box.
//
// A recryption refreshes a noisy FV ciphertext: the box decrypts it with its
// own secret key (share) and immediately re-encrypts the recovered bit under
// the client's public key with fresh noise. All polynomial arithmetic runs in
// CRT form: two symmetric channels, one per 20-bit prime (q0 = 878593,
// q1 = 890881, q = q0*q1), each a PALU with its own memory file of six RAM
// blocks. The channels meet only in the inverse CRT / decode-encode block
// (constant coefficient of the decrypted polynomial) and share the discrete
// Gaussian sampler and the control/address unit.
//
// Block usage (ring dimension n = N, N/2 words per block):
//   M0  box secret key s, NTT domain      M1, M2  client public key (b, a), NTT domain
//   M3  c1 in; c0' out                    M4      c0 in; scratch (e1, b*u, e2)
//   M5  u, then c1' out
// Load M0..M4 through the host port, start CMD_RECRYPT, wait for done and
// read the refreshed ciphertext (c0', c1') from M3 and M5. Individual
// commands (NTT, INTT, PMUL, PADD, GAUSS, TERN, DECODE) can also be started
// on any blocks, which is how the single operations are measured.
//
// Host port: while busy is low, host_we writes {hi, lo} coefficient words of
// both channels into block host_bank; host_re reads, data valid on
// host_rdata one cycle later. The host port stands in for the Ethernet link
// and its wrapper, which are not part of this RTL. trng supplies 9 random bits
// per clock (the nine TRNGs). Default N = 1024 is the document's parameter
// set; smaller powers of two are supported for quick simulation.
//
// Lint notes: the sampler's signed sample and its scan_event flag are left
// unused here (the memories take the residues), and rst_n also appears in
// the disable condition of the port-rule assertions, which lint reports as
// a reset used both synchronously and asynchronously; neither is a circuit
// issue.
module recryption_box
  import fv_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  cmd_e        cmd,
  input  bank_t       bank_a,
  input  bank_t       bank_b,
  input  bank_t       bank_dst,
  output logic        busy,
  output logic        done,
  input  logic        host_we,
  input  logic        host_re,
  input  bank_t       host_bank,
  input  logic [$clog2(N/2)-1:0] host_addr,
  input  word_t       host_wdata [2],
  output word_t       host_rdata [2],
  input  logic [8:0]  trng,
  output logic        dec_bit
);
  localparam int unsigned H  = N / 2;
  localparam int unsigned AW = $clog2(H);
  localparam int unsigned QS  [2] = '{Q0, Q1};
  localparam int unsigned PSS [2] = '{PSI0_1024, PSI1_1024};

  // controller
  logic        c_rd_a_en, c_rd_b_en, c_wr_en;
  bank_t       c_rd_a_bank, c_rd_b_bank, c_wr_bank;
  logic [AW-1:0] c_rd_a_addr, c_rd_b_addr, c_wr_addr;
  word_t       c_wr_data [2];
  word_t       rd_a_data [2], rd_b_data [2];
  logic        p_valid, p_sel2, p_tw_load, p_tw2_load, p_tw_commit;
  pop_e        p_op;
  logic [19:0] p_a [2], p_b [2];
  logic [5:0]  p_idx;
  wbtag_t      p_tag;
  logic        tw_pending [2];
  logic        dgs_en, dgs_mode, dgs_valid, dgs_scan;
  logic [19:0] dgs_mod [2];
  logic signed [7:0] dgs_sample;
  logic        dec_valid;
  logic [19:0] dec_enc [2];

  ctrl_addr_unit #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .start(start), .cmd(cmd), .bank_a(bank_a), .bank_b(bank_b),
    .bank_dst(bank_dst), .busy(busy), .done(done),
    .rd_a_en(c_rd_a_en), .rd_a_bank(c_rd_a_bank), .rd_a_addr(c_rd_a_addr),
    .rd_b_en(c_rd_b_en), .rd_b_bank(c_rd_b_bank), .rd_b_addr(c_rd_b_addr),
    .rd_a_data(rd_a_data), .rd_b_data(rd_b_data),
    .wr_en(c_wr_en), .wr_bank(c_wr_bank), .wr_addr(c_wr_addr), .wr_data(c_wr_data),
    .p_valid(p_valid), .p_op(p_op), .p_a(p_a), .p_b(p_b), .p_sel2(p_sel2),
    .p_idx(p_idx), .p_tag(p_tag), .p_tw_load(p_tw_load),
    .p_tw2_load(p_tw2_load), .p_tw_commit(p_tw_commit),
    .tw_pending(tw_pending[0]),
    .dgs_en(dgs_en), .dgs_mode(dgs_mode), .dgs_valid(dgs_valid),
    .dgs_mod(dgs_mod), .dec_valid(dec_valid), .dec_enc(dec_enc)
  );

  // shared Gaussian sampler
  knuth_yao_dgs #(.Q0(Q0), .Q1(Q1)) u_dgs (
    .clk(clk), .rst_n(rst_n), .en(dgs_en), .mode(dgs_mode), .rnd(trng),
    .out_valid(dgs_valid), .out_sample(dgs_sample),
    .out_mod0(dgs_mod[0]), .out_mod1(dgs_mod[1]), .scan_event(dgs_scan)
  );

  // two residue channels
  logic        prod_valid [2];
  logic [39:0] prod [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic       p_we;
    bank_t      p_bank;
    logic [8:0] p_addr;
    word_t      p_wdata;
    logic       m_we;
    bank_t      m_wbank;
    logic [AW-1:0] m_waddr;
    word_t      m_wdata;

    palu #(.Q(QS[c]), .PSI1024(PSS[c]), .Q_OTHER(QS[1-c]), .N(N)) u_palu (
      .clk(clk), .rst_n(rst_n),
      .in_valid(p_valid), .in_op(p_op), .in_a(p_a[c]), .in_b(p_b[c]),
      .in_sel2(p_sel2), .in_idx(p_idx), .in_tag(p_tag),
      .tw_load(p_tw_load), .tw2_load(p_tw2_load), .tw_commit(p_tw_commit),
      .tw_pending(tw_pending[c]),
      .mem_we(p_we), .mem_bank(p_bank), .mem_addr(p_addr), .mem_wdata(p_wdata),
      .prod_valid(prod_valid[c]), .prod(prod[c])
    );

    always_comb begin
      if (p_we) begin
        m_we = 1'b1; m_wbank = p_bank; m_waddr = AW'(p_addr); m_wdata = p_wdata;
      end else if (c_wr_en) begin
        m_we = 1'b1; m_wbank = c_wr_bank; m_waddr = c_wr_addr; m_wdata = c_wr_data[c];
      end else begin
        m_we = host_we && !busy; m_wbank = host_bank; m_waddr = host_addr;
        m_wdata = host_wdata[c];
      end
    end

    poly_mem #(.DEPTH(H)) u_mem (
      .clk(clk), .rst_n(rst_n),
      .rd_a_en(busy ? c_rd_a_en : host_re),
      .rd_a_bank(busy ? c_rd_a_bank : host_bank),
      .rd_a_addr(busy ? c_rd_a_addr : host_addr),
      .rd_a_data(rd_a_data[c]),
      .rd_b_en(busy && c_rd_b_en), .rd_b_bank(c_rd_b_bank),
      .rd_b_addr(c_rd_b_addr), .rd_b_data(rd_b_data[c]),
      .wr_en(m_we), .wr_bank(m_wbank), .wr_addr(m_waddr), .wr_data(m_wdata)
    );

    assign host_rdata[c] = rd_a_data[c];
  end

  // inverse CRT and decode-encode
  logic        icrt_valid;
  logic [39:0] icrt_a;

  icrt u_icrt (
    .clk(clk), .rst_n(rst_n), .in_valid(prod_valid[0]),
    .p0(prod[0]), .p1(prod[1]), .out_valid(icrt_valid), .a(icrt_a)
  );

  decode_encode u_dec (
    .clk(clk), .rst_n(rst_n), .in_valid(icrt_valid), .a(icrt_a),
    .out_valid(dec_valid), .bit_out(dec_bit),
    .enc0(dec_enc[0]), .enc1(dec_enc[1])
  );

endmodule
