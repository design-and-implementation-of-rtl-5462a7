// Stage 1: weight and input memories, weight update and the two multipliers.
//
// Five 256x16 memories: one holds the input vector, the other four hold the
// weights, two per neuron. Each weight memory has two halves: addresses
// 0..127 hold the weights w (x1..x125 weights, then the bias weight against
// the constant input 1, then the all-zero end-of-vector word, the
// "zero-byte"), and addresses 128..255 the same layout for the perturbed
// weights w + h. The input memory is read at the address within the half, so
// one copy of x (x1..x125 followed by 1.0 for the bias) serves both halves.
//
// Per clock one address is read from the input memory and from the read
// memory of each neuron's pair (selected by the J-K toggle of swap_ctrl).
// The derivative of the previous iteration is subtracted from each weight
// (weight_update), the updated weight is multiplied by the input in the two
// parallel multipliers, and the same updated weight is written to the other
// memory of the pair at the same address. So in one pass the network is
// evaluated with the new weights and the new weights are recorded, and the
// memories swap roles for the next iteration.
//
// The zero-byte is recognised by a 16-input zero test on neuron 1's weight
// word; it closes the current half. It is never written (the marker locations
// of the written memories keep their contents) and neither is anything after
// it in the same half, so the write memories must be loaded with their
// markers too. Testing only neuron 1's word, placing the bias weight at
// address 125, and loading through a port while idle are this
// implementation's choices.
//
// Timing: address issued at clock n, memory data at n+1, products, p_valid,
// zero_byte and half registered at n+2. One word per clock, 2*128 clocks per
// iteration plus the wait for stage 4.
module stage1
  import nn_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [DER_W-1:0] der,        // dE/dw, 1/16 units
  input  logic                    der_valid,
  input  logic                    stop,
  // load / read-back port, honoured only while idle
  input  logic                    ld_we,
  input  mem_sel_t                ld_sel,
  input  logic [AW-1:0]           ld_addr,
  input  logic [WORD_W-1:0]       ld_wdata,
  output logic [WORD_W-1:0]       ld_rdata,   // one clock after ld_sel/ld_addr
  // status
  output logic                    busy,
  output logic                    bank_q,
  // to stage 2
  output prod_t                   p1,
  output prod_t                   p2,
  output logic                    p_valid,
  output logic                    zero_byte,
  output logic                    half        // 0: weights w, 1: weights w + h
);

  logic          issue, issue_d, waiting;
  logic [AW-1:0] addr, addr_d;

  swap_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .start, .der_valid, .stop,
    .busy, .waiting, .q(bank_q), .issue, .addr
  );

  // ---------------------------------------------------------------- memories
  logic              we_x, we_1a, we_1b, we_2a, we_2b;
  logic [AW-1:0]     ad_x, ad_1a, ad_1b, ad_2a, ad_2b;
  logic [WORD_W-1:0] wd_x, wd_1, wd_2;
  logic [WORD_W-1:0] rd_x, rd_1a, rd_1b, rd_2a, rd_2b;

  sync_ram #(.DEPTH(1 << AW), .WIDTH(WORD_W)) u_ram_x  (.clk, .we(we_x),  .addr(ad_x),  .wdata(wd_x), .rdata(rd_x));
  sync_ram #(.DEPTH(1 << AW), .WIDTH(WORD_W)) u_ram_1a (.clk, .we(we_1a), .addr(ad_1a), .wdata(wd_1), .rdata(rd_1a));
  sync_ram #(.DEPTH(1 << AW), .WIDTH(WORD_W)) u_ram_1b (.clk, .we(we_1b), .addr(ad_1b), .wdata(wd_1), .rdata(rd_1b));
  sync_ram #(.DEPTH(1 << AW), .WIDTH(WORD_W)) u_ram_2a (.clk, .we(we_2a), .addr(ad_2a), .wdata(wd_2), .rdata(rd_2a));
  sync_ram #(.DEPTH(1 << AW), .WIDTH(WORD_W)) u_ram_2b (.clk, .we(we_2b), .addr(ad_2b), .wdata(wd_2), .rdata(rd_2b));

  // ------------------------------------------------------- read-side datapath
  logic [WORD_W-1:0] w1_word, w2_word;
  logic              zb_raw, seen, wr_ok;
  sm8_t              x, w1_new, w2_new;
  prod_t             prod1, prod2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue_d <= 1'b0;
      addr_d  <= '0;
    end else begin
      issue_d <= issue;
      addr_d  <= addr;
    end
  end

  assign w1_word = bank_q ? rd_1b : rd_1a;
  assign w2_word = bank_q ? rd_2b : rd_2a;
  assign x       = sm8_t'(rd_x[7:0]);

  // 16-bit zero-byte detector
  assign zb_raw = issue_d && (w1_word == ZERO_BYTE);
  // a word is live if it comes before the marker of its half
  assign wr_ok  = issue_d && !zb_raw && !seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            seen <= 1'b0;
    else if (issue_d) begin
      if (addr_d[AW-2:0] == '1)            seen <= 1'b0;   // end of a half
      else if (zb_raw)                     seen <= 1'b1;
    end
  end

  weight_update u_upd1 (.w(sm8_t'(w1_word[7:0])), .der, .w_new(w1_new));
  weight_update u_upd2 (.w(sm8_t'(w2_word[7:0])), .der, .w_new(w2_new));

  sm_mult u_mul1 (.a(x), .b(w1_new), .p(prod1));
  sm_mult u_mul2 (.a(x), .b(w2_new), .p(prod2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1 <= '0; p2 <= '0; p_valid <= 1'b0; zero_byte <= 1'b0; half <= 1'b0;
    end else begin
      p1        <= prod1;
      p2        <= prod2;
      p_valid   <= wr_ok;
      zero_byte <= zb_raw && !seen;
      half      <= addr_d[AW-1];
    end
  end

  // ------------------------------------------------------- memory port muxes
  always_comb begin
    wd_1 = {8'h00, w1_new};
    wd_2 = {8'h00, w2_new};
    wd_x = ld_wdata;
    if (busy) begin
      we_x  = 1'b0;
      ad_x  = {1'b0, addr[AW-2:0]};
      // read memory at the issued address, write memory one clock behind
      we_1a = wr_ok &&  bank_q;  ad_1a = bank_q ? addr_d : addr;
      we_1b = wr_ok && !bank_q;  ad_1b = bank_q ? addr : addr_d;
      we_2a = wr_ok &&  bank_q;  ad_2a = bank_q ? addr_d : addr;
      we_2b = wr_ok && !bank_q;  ad_2b = bank_q ? addr : addr_d;
    end else begin
      wd_1  = ld_wdata;
      wd_2  = ld_wdata;
      we_x  = ld_we && (ld_sel == MEM_X);    ad_x  = ld_addr;
      we_1a = ld_we && (ld_sel == MEM_W1A);  ad_1a = ld_addr;
      we_1b = ld_we && (ld_sel == MEM_W1B);  ad_1b = ld_addr;
      we_2a = ld_we && (ld_sel == MEM_W2A);  ad_2a = ld_addr;
      we_2b = ld_we && (ld_sel == MEM_W2B);  ad_2b = ld_addr;
    end
  end

  mem_sel_t ld_sel_d;
  always_ff @(posedge clk) ld_sel_d <= ld_sel;

  always_comb begin
    unique case (ld_sel_d)
      MEM_X:   ld_rdata = rd_x;
      MEM_W1A: ld_rdata = rd_1a;
      MEM_W1B: ld_rdata = rd_1b;
      MEM_W2A: ld_rdata = rd_2a;
      MEM_W2B: ld_rdata = rd_2b;
      default: ld_rdata = '0;
    endcase
  end

endmodule
