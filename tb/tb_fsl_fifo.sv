// tb_fsl_fifo: random writes and reads on the FSL FIFO, never writing when
// full or reading when empty (the link rules), checked against a queue model:
// every word read (data and control bit) must be the oldest one written, and
// full / exists / count must match the model each clock. The FIFO is driven
// into full and back to empty several times.
module tb_fsl_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int D = 8;
  logic mw, mc, full, ex, sc, sr;
  logic [31:0] md, sd;
  logic [3:0] cnt;
  logic [32:0] model[$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  fsl_fifo #(.WIDTH(32), .DEPTH(D)) dut (.clk, .rst_n, .m_write(mw), .m_data(md), .m_control(mc),
    .m_full(full), .s_exists(ex), .s_data(sd), .s_control(sc), .s_read(sr), .count(cnt));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mw = 0; mc = 0; md = 0; sr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = ((i / 200) % 2) ? 75 : 25;   // alternate filling and draining phases
      checks++;
      if (full !== (model.size() == D) || ex !== (model.size() != 0) || int'(cnt) != model.size()) begin
        failures++;
        $display("FAIL flags: full=%0b exists=%0b count=%0d model=%0d", full, ex, cnt, model.size());
      end
      if (full) fulls++;
      if (!ex) empties++;
      mw = !full && ($urandom_range(0, 99) >= bias);
      md = $urandom; mc = $urandom_range(0, 1);
      sr = ex && ($urandom_range(0, 99) < bias);
      if (sr) begin
        checks++;
        if ({sc, sd} !== model[0]) begin
          failures++;
          $display("FAIL data got %h expected %h", {sc, sd}, model[0]);
        end
      end
      @(posedge clk); #1;
      if (sr) void'(model.pop_front());
      if (mw) model.push_back({mc, md});
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL the FIFO never became full (%0d) or empty (%0d)", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
