// tb_delta_ram: fills the memory with random words at its default size, then reads
// every entry back in a random order while overwriting others, checking each
// read against a shadow array. Read latency is checked too: data appears one clock after the address (synchronous read; a read of the word written in the same cycle returns the old word).
module tb_delta_ram;
  import viterbi_pkg::*;
  localparam int N = 147;
  localparam int SAW = $clog2(147);

  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [SAW-1:0] waddr = '0, raddr = '0;
  cost_t wdata, rdata;
  cost_t shadow [N];
  int checks = 0, failures = 0;

  delta_ram dut (.*);

  initial begin
    wdata = '0;
    for (int i = 0; i < N; i++) begin
      shadow[i] = cost_t'({$urandom, $urandom});
      we = 1; waddr = SAW'(i); wdata = shadow[i];
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 4 * N; n++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int w = $urandom_range(0, N - 1);
      cost_t old;
      raddr = SAW'(a);
      old = shadow[a];
      we = 1'($urandom_range(0, 1)); waddr = SAW'(w); wdata = cost_t'({$urandom, $urandom});
      if (n % 7 == 0) waddr = SAW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== old) begin failures++; $display("FAIL addr %0d", a); end
      if (we) shadow[waddr] = wdata;
      
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
