// tb_depth_buffer: self-checking test of the on-chip depth frame store.
//
// Loads a 10x6 frame through the write stream (with idle cycles), checks the
// fill counter, then reads random addresses on two ports at once and checks
// that each returns the stored word exactly one cycle later. A second frame
// after frame_start must replace the first.
module tb_depth_buffer;
  import kf_pkg::*;

  localparam int W = 10, H = 6, N = W * H, AW = $clog2(N), NR = 2;
  logic clk = 0, rst_n = 0, frame_start = 0, wr_valid = 0;
  depth_t wr_data = '0;
  logic [AW:0] wr_count;
  logic [NR-1:0][AW-1:0] rd_addr = '0;
  depth_t [NR-1:0] rd_data;
  int checks = 0, failures = 0;
  int img [N];

  depth_buffer #(.W(W), .H(H), .NREAD(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int seed);
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int i = 0; i < N; i++) begin
      img[i] = (i * 37 + seed * 1001) % 65536;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
      wr_valid = 1; wr_data = depth_t'(img[i]); @(negedge clk); wr_valid = 0;
    end
    checks++;
    if (int'(wr_count) != N) begin failures++; $display("FAIL count %0d", wr_count); end
  endtask

  task automatic reads(int n);
    for (int k = 0; k < n; k++) begin
      int a0 = $urandom_range(0, N - 1), a1 = $urandom_range(0, N - 1);
      rd_addr[0] = AW'(a0); rd_addr[1] = AW'(a1);
      @(posedge clk); #1;
      rd_addr[0] = AW'($urandom_range(0, N - 1));   // next address must not matter
      checks += 2;
      if (int'(rd_data[0]) != img[a0]) begin failures++; $display("FAIL p0 a=%0d", a0); end
      if (int'(rd_data[1]) != img[a1]) begin failures++; $display("FAIL p1 a=%0d", a1); end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(1); reads(100);
    load(2); reads(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
