// tb_frame_ram: self-checking testbench of the one-bit frame memory.
// Fills a small memory, then runs random simultaneous reads and writes
// against a shadow array, checking read data one clock after rd_en and
// that rd_data holds its value while rd_en is low.
module tb_frame_ram;
  localparam int DEPTH = 300, AW = $clog2(DEPTH);
  logic clk = 0;
  logic rd_en, rd_data, we, wr_data;
  logic [AW-1:0] rd_addr, wr_addr;

  frame_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit shadow[DEPTH];

  initial begin
    bit expd;
    rd_en = 0; we = 0; rd_addr = '0; wr_addr = '0; wr_data = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = $urandom_range(0, 1);
      shadow[a] = wr_data;
    end
    @(negedge clk) we = 0;
    expd = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      we      = $urandom_range(0, 1);
      wr_addr = AW'($urandom_range(0, DEPTH - 1));
      if (wr_addr == rd_addr) wr_addr = AW'((int'(wr_addr) + 1) % DEPTH);
      wr_data = $urandom_range(0, 1);
      if (rd_en) expd = shadow[rd_addr];
      @(posedge clk);
      if (we) shadow[wr_addr] = wr_data;
      #1;
      checks++;
      if (rd_data !== expd) begin
        failures++;
        $display("read %0d: %0b expected %0b", rd_addr, rd_data, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
