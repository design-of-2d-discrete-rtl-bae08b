// tb_transpose_module: self-checking testbench for the N x N transposer.
// For several random matrices: the rows are loaded in mode A (with random
// idle clocks in between, en low), then N mode-B clocks read the columns.
// Before read step k, dout[j] must equal element k of row N-1-j, i.e. the
// matrix comes out transposed, one column per clock.  Runs at the default
// N = 8 and also with N = 4 (the size of the published example).
module tb_transpose_module;
  localparam int unsigned W = 17;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Size-independent driver/checker for one instance.
  logic         en8, mode8, en4, mode4;
  logic [W-1:0] din8 [8];
  logic [W-1:0] dout8 [8];
  logic [W-1:0] din4 [4];
  logic [W-1:0] dout4 [4];

  transpose_module #(.N(8), .W(W)) dut8 (.clk, .en(en8), .mode(mode8), .din(din8), .dout(dout8));
  transpose_module #(.N(4), .W(W)) dut4 (.clk, .en(en4), .mode(mode4), .din(din4), .dout(dout4));

  logic [W-1:0] m [8][8];

  task automatic run8();
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) m[r][c] = W'($urandom);
    for (int r = 0; r < 8; r++) begin
      while ($urandom_range(0, 2) == 0) begin en8 = 1'b0; @(posedge clk); #1; end
      en8 = 1'b1; mode8 = 1'b0;
      for (int c = 0; c < 8; c++) din8[c] = m[r][c];
      @(posedge clk); #1;
    end
    en8 = 1'b0;
    for (int k = 0; k < 8; k++) begin
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (dout8[j] !== m[7-j][k]) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 col %0d out %0d got %h exp %h", k, j, dout8[j], m[7-j][k]);
        end
      end
      en8 = 1'b1; mode8 = 1'b1;
      @(posedge clk); #1;
    end
    en8 = 1'b0;
  endtask

  task automatic run4();
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = W'($urandom);
    for (int r = 0; r < 4; r++) begin
      en4 = 1'b1; mode4 = 1'b0;
      for (int c = 0; c < 4; c++) din4[c] = m[r][c];
      @(posedge clk); #1;
    end
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (dout4[j] !== m[3-j][k]) begin
          failures++;
          if (failures < 10) $display("FAIL N=4 col %0d out %0d got %h exp %h", k, j, dout4[j], m[3-j][k]);
        end
      end
      en4 = 1'b1; mode4 = 1'b1;
      @(posedge clk); #1;
    end
    en4 = 1'b0;
  endtask

  initial begin
    en8 = 1'b0; mode8 = 1'b0; en4 = 1'b0; mode4 = 1'b0;
    for (int i = 0; i < 8; i++) din8[i] = '0;
    for (int i = 0; i < 4; i++) din4[i] = '0;
    @(posedge clk); #1;
    for (int b = 0; b < 6; b++) run8();
    for (int b = 0; b < 4; b++) run4();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
