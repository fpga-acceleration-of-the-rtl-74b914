// tb_frame_mem: writes random words to a 64-word, 3-read-port memory, reads
// them back through all ports at independent addresses, and checks the
// one-clock read latency and read-before-write on a same-clock collision.
module tb_frame_mem;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we = 0;
  logic [5:0]  waddr = 0;
  logic [15:0] wdata = 0;
  logic [5:0]  raddr [3];
  logic [15:0] rdata [3];

  frame_mem #(.DW(16), .DEPTH(64), .NRD(3)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0;
  logic [15:0] model [64];

  initial begin
    for (int p = 0; p < 3; p++) raddr[p] = '0;
    for (int a = 0; a < 64; a++) begin
      model[a] = 16'($urandom);
      we <= 1; waddr <= 6'(a); wdata <= model[a];
      @(posedge clk);
    end
    we <= 0;
    for (int k = 0; k < 200; k++) begin
      logic [5:0] a [3];
      for (int p = 0; p < 3; p++) begin a[p] = 6'($urandom); raddr[p] <= a[p]; end
      // write during the read of port 0: the old word must be returned
      we <= 1; waddr <= a[0]; wdata <= 16'($urandom);
      @(posedge clk);
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] != model[a[p]]) begin
          failures++; $display("FAIL port %0d addr %0d got %h want %h", p, a[p], rdata[p], model[a[p]]);
        end
      end
      model[a[0]] = dut.mem[a[0]];
      checks++;
      if (model[a[0]] != wdata) begin failures++; $display("FAIL write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
