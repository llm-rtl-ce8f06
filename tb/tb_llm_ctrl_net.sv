// tb_llm_ctrl_net - self-checking test of the electrical control plane:
// random commands and notifications must arrive exactly T_NET cycles later
// at, and only at, their destination, with their contents intact.
module tb_llm_ctrl_net;
  localparam int R = 3, C = 2, PW = 10, AW = 5, NET = 5;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] up_valid = '0;
  logic [R-1:0][0:0] up_ch = '0;
  logic [R-1:0][PW-1:0] up_pkt = '0;
  logic [C-1:0][R-1:0] dn_valid;
  logic [C-1:0][R-1:0][PW-1:0] dn_pkt;
  logic [C-1:0] ack_valid = '0;
  logic [C-1:0][1:0] ack_req = '0;
  logic [C-1:0][AW-1:0] ack_pkt = '0;
  logic [R-1:0][C-1:0] rack_valid;
  logic [R-1:0][C-1:0][AW-1:0] rack_pkt;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int v; int dst; int pkt; } ev_t;
  ev_t up_hist [int][R];
  ev_t ak_hist [int][C];

  llm_ctrl_net #(.NUM_REQ(R), .NUM_CH(C), .PKT_W(PW), .ACK_W(AW), .T_NET(NET)) dut (
    .clk, .rst_n, .up_valid, .up_ch, .up_pkt, .dn_valid, .dn_pkt,
    .ack_valid, .ack_req, .ack_pkt, .rack_valid, .rack_pkt);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int r = 0; r < R; r++) begin
        up_valid[r] = 1'($urandom); up_ch[r] = 1'($urandom); up_pkt[r] = PW'($urandom);
        up_hist[cyc][r] = '{int'(up_valid[r]), int'(up_ch[r]), int'(up_pkt[r])};
      end
      for (int c = 0; c < C; c++) begin
        ack_valid[c] = 1'($urandom); ack_req[c] = 2'($urandom_range(0, R - 1)); ack_pkt[c] = AW'($urandom);
        ak_hist[cyc][c] = '{int'(ack_valid[c]), int'(ack_req[c]), int'(ack_pkt[c])};
      end
      #1;
      if (up_hist.exists(cyc - NET)) begin
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          ev_t e;
          e = up_hist[cyc - NET][r];
          checks++;
          if (dn_valid[c][r] !== (e.v == 1 && e.dst == c) || (dn_valid[c][r] && int'(dn_pkt[c][r]) != e.pkt)) begin
            failures++; $display("t=%0d command r%0d->c%0d wrong", t, r, c);
          end
        end
        for (int c = 0; c < C; c++) for (int r = 0; r < R; r++) begin
          ev_t e;
          e = ak_hist[cyc - NET][c];
          checks++;
          if (rack_valid[r][c] !== (e.v == 1 && e.dst == r) || (rack_valid[r][c] && int'(rack_pkt[r][c]) != e.pkt)) begin
            failures++; $display("t=%0d notification c%0d->r%0d wrong", t, c, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
