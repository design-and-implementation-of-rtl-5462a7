// Stage 3: activation and squared error for one neuron.
//
// The neuron output o = tanh(Y) is read from a 128x8 look-up RAM addressed by
// |Y|. Because tanh is odd, the table holds only the positive half and the
// sign of Y is put back onto the value read out. The target t is read from a
// 16x8 RAM addressed by the pattern selector t_sel. The stage then forms
// e = o - t and the squared error e^2 (equation (6) with the division by two
// deferred; no divider). The sign of Y, the valid flag and the half tag are
// delayed by flip-flops so that they meet the table output.
//
// Table addressing: |Y| in S DDD.FFFF units (Y / 16 in its 1/256 units,
// truncated) and saturated to 127, so entry i stands for tanh(i/16). The
// table is loaded through the write port (bit 7 of an entry is ignored);
// round(16*tanh(i/16)) is the natural content. The address scaling, the
// truncation and the write-port arrangement are this implementation's
// choices.
//
// Timing: y_valid at clock n, table read at n+1, e_sq/e_valid at n+2, o
// with it.
module stage3_error
  import nn_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Y_W-1:0] y,
  input  logic                  y_valid,
  input  logic                  y_half,
  input  logic [3:0]            t_sel,       // training pattern number
  // table loading (idle only)
  input  logic                  tanh_we,
  input  logic [6:0]            tanh_addr,
  input  logic                  tgt_we,
  input  logic [3:0]            tgt_addr,
  input  logic [7:0]            tbl_wdata,
  // results
  output sm8_t                  o,
  output sm8_t                  t,
  output logic [SQ_W-1:0]       e_sq,
  output logic                  e_valid,
  output logic                  e_half
);

  logic [Y_W-1:0]     y_abs;
  logic [Y_W-1-FRAC:0] y_q;
  logic [6:0]         idx;
  logic [7:0]         tanh_rd, tgt_rd;
  logic               sgn_d, valid_d, half_d;
  sm8_t               o_c, t_c;
  logic signed [ERR_W-1:0] err;

  always_comb begin
    y_abs = y[Y_W-1] ? Y_W'(-y) : Y_W'(y);
    y_q   = y_abs[Y_W-1:FRAC];
    idx   = (y_q > 127) ? 7'd127 : y_q[6:0];
  end

  sync_ram #(.DEPTH(128), .WIDTH(8)) u_tanh (
    .clk, .we(tanh_we), .addr(tanh_we ? tanh_addr : idx), .wdata(tbl_wdata), .rdata(tanh_rd)
  );
  sync_ram #(.DEPTH(16), .WIDTH(8)) u_tgt (
    .clk, .we(tgt_we), .addr(tgt_we ? tgt_addr : t_sel), .wdata(tbl_wdata), .rdata(tgt_rd)
  );

  // delay flip-flops aligning sign, valid and half with the table output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sgn_d <= 1'b0; valid_d <= 1'b0; half_d <= 1'b0;
    end else begin
      sgn_d   <= y[Y_W-1];
      valid_d <= y_valid;
      half_d  <= y_half;
    end
  end

  always_comb begin
    o_c = '{s: sgn_d, mag: tanh_rd[6:0]};
    t_c = sm8_t'(tgt_rd);
    err = ERR_W'(sm_to_int(o_c)) - ERR_W'(sm_to_int(t_c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o <= '0; t <= '0; e_sq <= '0; e_valid <= 1'b0; e_half <= 1'b0;
    end else begin
      e_valid <= valid_d;
      if (valid_d) begin
        o      <= o_c;
        t      <= t_c;
        e_sq   <= SQ_W'(err * err);
        e_half <= half_d;
      end
    end
  end

endmodule
