// tb_dct_out_mux: drives random single-unit (or idle) input cycles and checks
// that the registered output carries the valid unit's vector, column index and
// unit number one cycle later, and nothing when no unit is valid.
module tb_dct_out_mux;
  localparam int NDCT = 5, N = 8, W = 12;
  logic clk = 0, rst = 1;
  logic [NDCT-1:0] in_valid = 0;
  logic [2:0] in_l0 [NDCT];
  logic signed [W-1:0] in_xc [NDCT][N];
  logic out_valid;
  logic [2:0] out_src, out_l0;
  logic signed [W-1:0] out_xc [N];
  int checks = 0, failures = 0, e_src = -1;
  logic [2:0] e_l0;
  logic signed [W-1:0] e_xc [N];

  dct_out_mux #(.NDCT(NDCT), .N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int p = 0; p < NDCT; p++) begin
      in_l0[p] = '0;
      for (int k = 0; k < N; k++) in_xc[p][k] = '0;
    end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 500; c++) begin
      int src;
      src = int'($urandom_range(NDCT));   // NDCT means idle
      @(negedge clk);
      for (int p = 0; p < NDCT; p++) begin
        in_l0[p] = 3'($urandom);
        for (int k = 0; k < N; k++) in_xc[p][k] = W'($urandom);
      end
      in_valid = (src < NDCT) ? NDCT'(1) << src : '0;
      @(posedge clk);
      #1;
      checks++;
      if (src == NDCT) begin
        if (out_valid) failures++;
      end else begin
        if (!out_valid || out_src != 3'(src) || out_l0 != in_l0[src]) failures++;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (out_xc[k] !== in_xc[src][k]) failures++;
        end
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
