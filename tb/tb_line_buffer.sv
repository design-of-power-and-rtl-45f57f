// Random test of the line buffer against an array model: each cycle a random
// column is read (the old contents must appear combinationally) and, with
// probability 3/4, overwritten. The whole buffer is written first, so every
// read returns a defined value.
module tb_line_buffer;
  localparam int unsigned DEPTH = 256;
  logic       clk = 0, we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = 8'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr  = 8'($urandom);
      we    = ($urandom % 4) != 0;
      wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL addr=%0d got %h expected %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
