// tb_transpose_cell: self-checking testbench for one transposer cell.
// Drives random words on both neighbour inputs with random mode and enable
// and checks, after every clock, that the cell took h_i in mode A, v_i in
// mode B, and held its word when not enabled.
module tb_transpose_cell;
  localparam int unsigned W = 17;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         en, mode;
  logic [W-1:0] h_i, v_i, q;
  logic [W-1:0] model;

  transpose_cell #(.W(W)) dut (.clk, .en, .mode, .h_i, .v_i, .q);

  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_hold = 0;

  initial begin
    en = 1'b1; mode = 1'b0; h_i = '0; v_i = '0;
    @(posedge clk); #1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      en   = ($urandom_range(0, 3) != 0);
      mode = 1'($urandom_range(0, 1));
      h_i  = W'($urandom);
      v_i  = W'($urandom);
      if (en && !mode) begin model = h_i; n_a++; end
      else if (en)     begin model = v_i; n_b++; end
      else             n_hold++;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL en=%0b mode=%0b q=%h exp %h", en, mode, q, model);
      end
    end
    if (n_a == 0 || n_b == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
