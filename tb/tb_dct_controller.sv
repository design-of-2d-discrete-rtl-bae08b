// tb_dct_controller: self-checking testbench for the block sequencer.
//
// The row and column DCTs are replaced by delay lines of DCT1D_LAT clocks
// (accept -> s1_valid, pop -> s2_valid).  nd is driven at random.  A
// reference model, written independently of the state encoding, tracks rows
// accepted, rows written into the buffer and columns read out, and on every
// clock checks rfd, start_dct, start, control, pop, cordic_out and out_col.
// It also checks that a complete block takes exactly 8 + DCT1D_LAT + 8 - 1
// clocks from first to last buffer read when rows arrive back to back, and
// that stalls (nd while rfd is low) and gaps (rfd with nd low) both happen.
module tb_dct_controller;
  import dct_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, nd, s1_valid, s2_valid;
  logic rfd, accept, start_dct, start, control, pop, cordic_out;
  logic [2:0] out_col;

  dct_controller dut (.clk, .rst, .nd, .s1_valid, .s2_valid, .rfd, .accept,
                      .start_dct, .start, .control, .pop, .cordic_out, .out_col);

  logic [DCT1D_LAT-1:0] d1, d2;
  always_ff @(posedge clk) begin
    if (rst) begin d1 <= '0; d2 <= '0; end
    else begin
      d1 <= {d1[DCT1D_LAT-2:0], accept};
      d2 <= {d2[DCT1D_LAT-2:0], pop};
    end
  end
  assign s1_valid = d1[DCT1D_LAT-1];
  assign s2_valid = d2[DCT1D_LAT-1];

  int checks = 0, failures = 0;
  int stalls = 0, gaps = 0, blocks = 0;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("FAIL %0t %s got %0b exp %0b", $time, what, got, exp);
    end
  endtask

  initial begin
    int rows, stored, drained, ocol;
    bit e_rfd, e_pop, e_acc, back_to_back;
    int t_first, t_last;
    rst = 1'b1; nd = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    rows = 0; stored = 0; drained = 0; ocol = 0;
    for (int n = 0; n < 3000; n++) begin
      back_to_back = (n < 200);
      nd = back_to_back ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      e_rfd = (rows < N);
      e_pop = (rows == N) && (stored == N);
      e_acc = nd && e_rfd;
      expect_eq("rfd", rfd, e_rfd);
      expect_eq("accept", accept, e_acc);
      expect_eq("start_dct", start_dct, e_acc && rows == 0);
      expect_eq("control", control, e_pop);
      expect_eq("pop", pop, e_pop);
      expect_eq("start", start, e_pop || s1_valid);
      expect_eq("cordic_out", cordic_out, s2_valid);
      if (s2_valid) begin
        checks++;
        if (int'(out_col) != ocol) begin failures++; $display("FAIL out_col %0d exp %0d", out_col, ocol); end
        ocol = (ocol + 1) % N;
      end
      if (nd && !e_rfd) stalls++;
      if (!nd && e_rfd) gaps++;
      if (e_acc && rows == 0) t_first = n;
      // advance the model
      if (s1_valid) stored++;
      if (e_acc) rows++;
      if (e_pop) begin
        drained++;
        if (drained == N) begin
          t_last = n;
          blocks++;
          if (blocks == 1) begin
            checks++;
            if (t_last - t_first != N + DCT1D_LAT + N - 1) begin
              failures++;
              $display("FAIL block time %0d exp %0d", t_last - t_first, N + DCT1D_LAT + N - 1);
            end
          end
          rows = 0; stored = 0; drained = 0;
        end
      end
      @(posedge clk);
      #1;
    end
    $display("blocks=%0d stalls=%0d gaps=%0d", blocks, stalls, gaps);
    if (blocks < 10 || stalls == 0 || gaps == 0) failures++;
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
