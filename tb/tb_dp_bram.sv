// tb_dp_bram: writes random words to random addresses of the dual-port RAM
// while reading others, keeping a shadow copy; each read must return, one
// clock later, the shadow word of the address read (old data when the same
// address is written in the same clock).
module tb_dp_bram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  localparam int W = 20, D = 64;
  logic we, re;
  logic [5:0] wa, ra;
  logic [W-1:0] wd, rd;
  logic [W-1:0] shadow [D];
  logic [D-1:0] written = '0;
  int checks = 0, failures = 0;

  dp_bram #(.WIDTH(W), .DEPTH(D)) dut (.clk, .wr_en(we), .wr_addr(wa), .wr_data(wd),
                                       .rd_en(re), .rd_addr(ra), .rd_data(rd));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_q;
    logic pend;
    we = 0; re = 0; wa = 0; ra = 0; wd = 0; pend = 0; exp_q = '0;
    // fill everything once
    for (int i = 0; i < D; i++) begin
      we = 1; wa = 6'(i); wd = W'($urandom); shadow[i] = wd;
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      we = $urandom_range(0, 1); wa = 6'($urandom); wd = W'($urandom);
      re = $urandom_range(0, 1); ra = (i % 7 == 0) ? wa : 6'($urandom);
      if (re) exp_q = shadow[ra];
      pend = re;
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      if (pend) begin
        checks++;
        if (rd !== exp_q) begin
          failures++;
          $display("FAIL read got %h expected %h", rd, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
