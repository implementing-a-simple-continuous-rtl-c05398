// tb_between_prob_ram: fills the memory with random words at its default size, then reads
// every entry back in a random order while overwriting others, checking each
// read against a shadow array. Read latency is checked too: data follows the address in the same cycle (combinational read).
module tb_between_prob_ram;
  import viterbi_pkg::*;
  localparam int N = 49;
  localparam int MAW = $clog2(49);

  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [MAW-1:0] waddr = '0, raddr = '0;
  tp_t wdata, rdata;
  tp_t shadow [N];
  int checks = 0, failures = 0;

  between_prob_ram dut (.*);

  initial begin
    wdata = '0;
    for (int i = 0; i < N; i++) begin
      shadow[i] = tp_t'({$urandom, $urandom});
      we = 1; waddr = MAW'(i); wdata = shadow[i];
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 4 * N; n++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int w = $urandom_range(0, N - 1);
      tp_t old;
      raddr = MAW'(a);
      old = shadow[a];
      we = 1'($urandom_range(0, 1)); waddr = MAW'(w); wdata = tp_t'({$urandom, $urandom});
      if (n % 7 == 0) waddr = MAW'(a);
      #1;
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL addr %0d", a); end
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
