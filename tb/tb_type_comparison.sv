// tb_type_comparison: runs the same packet stream through four coded paths
// whose encoders count Type 1, 2, 3 and 4 transitions, the comparison the
// four encoder variants are evaluated by. Two traffic patterns are used:
// uniformly random payloads, and correlated payloads in which each body flit
// differs from the one before in one or two bits. Every path must deliver
// every flit intact and in order; for each variant and pattern the link's
// self transitions and coupling transitions (Type 1 pair = 1, Type 2 pair =
// 2) are reported next to those of the uncoded flits.
module tb_type_comparison;
  import noc_enc_pkg::*;
  import odd_invert_ref_pkg::*;

  localparam int W = 9;
  localparam int HOPS = 2;

  logic clk = 0, rst_n = 0;
  logic src_valid = 0, src_head = 0;
  logic [W-2:0] src_data = '0;
  logic [W+1:0] link_tx [4];
  logic [W+1:0] link_rx [4];
  logic [3:0] dst_valid, dst_head, inv_taken;
  logic [W-2:0] dst_data [4];

  for (genvar t = 0; t < 4; t++) begin : g_path
    noc_odd_invert_top #(.W(W), .TYPE(trans_type_e'(t))) dut (
      .clk, .rst_n, .src_valid, .src_head, .src_data,
      .link_tx(link_tx[t]), .link_rx(link_rx[t]),
      .dst_valid(dst_valid[t]), .dst_head(dst_head[t]), .dst_data(dst_data[t]),
      .inv_taken(inv_taken[t]));
    noc_path_model #(.WIDTH(W + 2), .HOPS(HOPS)) u_net (
      .clk, .rst_n, .d(link_tx[t]), .q(link_rx[t]));
  end

  logic [W-1:0] sent [$];        // {head, data} in order
  int rd_ptr [4];
  int checks = 0, failures = 0;
  int sa [4], csa [4], ninv [4];
  int sa_u = 0, csa_u = 0;
  logic [W-1:0] prev [4];
  logic [W-1:0] prev_u = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (src_valid) sent.push_back({src_head, src_data});
    for (int t = 0; t < 4; t++) begin
      if (link_tx[t][W+1]) begin
        sa[t]  += self_cost(W, 64'(prev[t]), 64'(link_tx[t][W-1:0]));
        csa[t] += coupling_cost(W, 64'(prev[t]), 64'(link_tx[t][W-1:0]));
        if (link_tx[t][W-1]) ninv[t]++;
        prev[t] = link_tx[t][W-1:0];
      end
      if (dst_valid[t]) begin
        checks++;
        if (rd_ptr[t] >= sent.size() || sent[rd_ptr[t]] != {dst_head[t], dst_data[t]}) begin
          failures++;
          $display("FAIL type %0d flit %0d corrupted", t + 1, rd_ptr[t]);
        end
        rd_ptr[t]++;
      end
    end
  end

  task automatic run(string name, bit correlated, int npkt);
    logic [W-2:0] d = 8'($urandom);
    for (int t = 0; t < 4; t++) begin sa[t] = 0; csa[t] = 0; ninv[t] = 0; end
    sa_u = 0; csa_u = 0;
    for (int p = 0; p < npkt; p++) begin
      int len = $urandom_range(2, 8);
      for (int f = 0; f <= len; f++) begin
        logic [W-1:0] plain;
        if (f == 0 || !correlated) d = 8'($urandom);
        else begin
          d = d ^ 8'(1 << $urandom_range(0, 7));
          if ($urandom_range(0, 1) != 0) d = d ^ 8'(1 << $urandom_range(0, 7));
        end
        src_valid <= 1'b1;
        src_head  <= (f == 0);
        src_data  <= d;
        plain = {1'b0, d};
        sa_u  += self_cost(W, 64'(prev_u), 64'(plain));
        csa_u += coupling_cost(W, 64'(prev_u), 64'(plain));
        prev_u = plain;
        @(posedge clk);
      end
    end
    src_valid <= 1'b0;
    repeat (HOPS + 6) @(posedge clk);
    $display("%s traffic, %0d packets: uncoded self %0d coupling %0d", name, npkt, sa_u, csa_u);
    for (int t = 0; t < 4; t++)
      $display("  Type %0d encoder: self %0d coupling %0d, %0d flits inverted",
               t + 1, sa[t], csa[t], ninv[t]);
  endtask

  initial begin
    for (int t = 0; t < 4; t++) begin rd_ptr[t] = 0; prev[t] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run("random", 1'b0, 500);
    run("correlated", 1'b1, 500);
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (rd_ptr[t] != sent.size()) begin
        failures++;
        $display("FAIL type %0d delivered %0d of %0d flits", t + 1, rd_ptr[t], sent.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
