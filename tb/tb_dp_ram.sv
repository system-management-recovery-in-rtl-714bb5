// tb_dp_ram: self-checking test of the dual-port private memory.
//
// Both ports write and read random words against a reference array; a read
// returns its word one cycle later and the read register holds while the
// port writes or idles. A small memory (256 words) keeps the run short.
module tb_dp_ram;
  import mcsoc_pkg::*;
  localparam int WORDS = 256;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  word_t a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  dp_ram #(.WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t model [WORDS];
  initial begin
    // fill through both ports
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 8'(i);     a_wdata = $urandom; model[i]   = a_wdata;
      b_en = 1; b_we = 1; b_addr = 8'(i + 1); b_wdata = $urandom; model[i+1] = b_wdata;
    end
    @(negedge clk); a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int n = 0; n < 400; n++) begin
      int ra, rb; bit wa, wb;
      @(negedge clk);
      ra = $urandom_range(0, WORDS-1); rb = $urandom_range(0, WORDS-1);
      wa = $urandom_range(0, 1); wb = $urandom_range(0, 1);
      if (wa && wb && ra == rb) wb = 0;
      a_en = 1; a_we = wa; a_addr = 8'(ra); a_wdata = $urandom;
      b_en = 1; b_we = wb; b_addr = 8'(rb); b_wdata = $urandom;
      begin
        word_t ea, eb, pa, pb;
        pa = a_rdata; pb = b_rdata;
        ea = model[ra]; eb = model[rb];
        @(posedge clk); #1;
        if (wa) model[ra] = a_wdata;
        if (wb) model[rb] = b_wdata;
        if (!wa) check(a_rdata == ea, $sformatf("port A read %0d", ra));
        else     check(a_rdata == pa, "port A read register held during write");
        if (!wb) check(b_rdata == eb, $sformatf("port B read %0d", rb));
        else     check(b_rdata == pb, "port B read register held during write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
