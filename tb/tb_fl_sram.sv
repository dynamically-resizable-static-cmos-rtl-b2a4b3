// tb_fl_sram -- self-checking test of the 64 x 9 free-list array.
// Writes random words through one-hot word lines (and idle cycles with no
// word line), keeps a model array, and checks every stored word after each
// write; a written word must appear one clock edge after the write.
module tb_fl_sram;
  localparam int unsigned N = 64, W = 9;
  logic clk = 0;
  logic [N-1:0] wen = '0;
  logic [W-1:0] wdata = '0;
  logic [N-1:0][W-1:0] words;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  fl_sram #(.ENTRIES(N), .WIDTH(W)) dut (.clk, .wen, .wdata, .words);

  always #5 clk = ~clk;

  initial begin
    // fill every entry once
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      wen = N'(1) << i; wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk); wen = '0;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (words[i] != model[i]) begin
          failures++;
          $display("FAIL entry %0d got %h want %h", i, words[i], model[i]);
        end
      end
      if ($urandom_range(0, 3) == 0) wen = '0;
      else begin
        int unsigned e;
        e = $urandom_range(0, N - 1);
        wen = N'(1) << e; wdata = W'($urandom); model[e] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
