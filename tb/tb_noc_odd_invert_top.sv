// tb_noc_odd_invert_top: end-to-end test of the coded path at its default
// size (9-bit link, Type 1 counting). Random wormhole packets (one header
// flit, 1..8 body flits, idle gaps) are sent from the source interface,
// through a 3-hop network model, to the destination interface. Checks: every
// flit arrives in order with its data and head bit restored, exactly
// 2 + 3 cycles after it was offered (encoder, three hops, decoder); header
// flits leave the encoder unencoded with flag 0. Counts how often each
// mechanism happened (header bypass, odd-bit inversion, plain body flit,
// idle link hold) and fails if one never did. Reports the link's self and
// coupling transitions against those of the same flits sent uncoded.
module tb_noc_odd_invert_top;
  import odd_invert_ref_pkg::*;

  localparam int W = 9;
  localparam int HOPS = 3;
  localparam int LAT = HOPS + 2;

  logic clk = 0, rst_n = 0;
  logic src_valid = 0, src_head = 0;
  logic [W-2:0] src_data = '0;
  logic [W+1:0] link_tx, link_rx;
  logic dst_valid, dst_head, inv_taken;
  logic [W-2:0] dst_data;

  noc_odd_invert_top dut (.*);
  noc_path_model #(.WIDTH(W + 2), .HOPS(HOPS)) u_net (.clk, .rst_n, .d(link_tx), .q(link_rx));

  typedef struct packed { logic head; logic [W-2:0] data; int unsigned t; } sent_t;
  sent_t sent [$];

  int checks = 0, failures = 0;
  int n_head = 0, n_inv = 0, n_plain = 0, n_idle = 0;
  int unsigned cycle = 0;
  int sa_coded = 0, sa_plain = 0, csa_coded = 0, csa_plain = 0;
  logic [W-1:0] prev_tx = '0, prev_plain = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: packets of one header and 1..8 body flits, random gaps
  task automatic send_packets(int npkt);
    for (int p = 0; p < npkt; p++) begin
      int len = $urandom_range(1, 8);
      for (int f = 0; f <= len; f++) begin
        while ($urandom_range(0, 5) == 0) begin
          src_valid <= 1'b0;
          @(posedge clk);
        end
        src_valid <= 1'b1;
        src_head  <= (f == 0);
        src_data  <= 8'($urandom);
        @(posedge clk);
      end
    end
    src_valid <= 1'b0;
  endtask

  // record what is offered, observe the link, check the destination
  always @(posedge clk) if (rst_n) begin
    if (src_valid) sent.push_back('{head: src_head, data: src_data, t: cycle});
    if (link_tx[W+1]) begin
      logic [W-1:0] plain;
      plain = {1'b0, link_tx[W-2:0] ^ (link_tx[W-1] ? 8'b1010_1010 : 8'h00)};
      if (link_tx[W]) begin
        n_head++;
        checks++;
        if (link_tx[W-1] || inv_taken) begin
          failures++;
          $display("FAIL header flit encoded: %b", link_tx);
        end
      end else if (link_tx[W-1]) n_inv++;
      else n_plain++;
      sa_coded   += self_cost(W, 64'(prev_tx), 64'(link_tx[W-1:0]));
      csa_coded  += coupling_cost(W, 64'(prev_tx), 64'(link_tx[W-1:0]));
      sa_plain   += self_cost(W, 64'(prev_plain), 64'(plain));
      csa_plain  += coupling_cost(W, 64'(prev_plain), 64'(plain));
      prev_plain = plain;
    end else begin
      n_idle++;
      checks++;
      if (link_tx[W-1:0] != prev_tx) begin
        failures++;
        $display("FAIL link moved while idle");
      end
    end
    prev_tx = link_tx[W-1:0];
    if (dst_valid) begin
      sent_t s;
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL flit delivered that was never sent");
      end else begin
        s = sent.pop_front();
        if (s.head != dst_head || s.data != dst_data || cycle - s.t != LAT) begin
          failures++;
          $display("FAIL got head=%b data=%h after %0d cycles, expected head=%b data=%h after %0d",
                   dst_head, dst_data, cycle - s.t, s.head, s.data, LAT);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_packets(300);
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin
      failures++;
      $display("FAIL %0d flits never delivered", sent.size());
    end
    $display("header bypasses %0d, odd-bit inversions %0d, plain body flits %0d, idle cycles %0d",
             n_head, n_inv, n_plain, n_idle);
    $display("link self transitions: coded %0d, uncoded %0d", sa_coded, sa_plain);
    $display("link coupling transitions: coded %0d, uncoded %0d", csa_coded, csa_plain);
    checks += 4;
    if (n_head == 0)  begin failures++; $display("FAIL no header bypass"); end
    if (n_inv == 0)   begin failures++; $display("FAIL no inversion"); end
    if (n_plain == 0) begin failures++; $display("FAIL no plain body flit"); end
    if (n_idle == 0)  begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
