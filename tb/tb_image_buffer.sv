// tb_image_buffer: self-checking test of the 28 x 28 image store.
// Writes three random images pixel by pixel (row-major index), attempts
// writes beyond pixel 783 that must be ignored, and reads every line back
// through the 28-pixel line port, comparing with a copy kept here.
// A watchdog ends a hung run.
module tb_image_buffer;
  import nn_pkg::*;

  logic clk = 1'b0, we = 1'b0;
  logic [9:0] addr;
  pixel_t wdata;
  logic [4:0] rd_line;
  pixel_t line_pix [LINE_PIX];
  int checks = 0, failures = 0;
  int model [IMG_PIX];

  always #5 clk = ~clk;

  image_buffer dut (.clk, .we, .addr, .wdata, .rd_line, .line_pix);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0; wdata = '0; rd_line = '0;
    for (int img = 0; img < 3; img++) begin
      for (int a = 0; a < IMG_PIX; a++) begin
        @(negedge clk);
        we = 1'b1; addr = 10'(a); wdata = pixel_t'($urandom); model[a] = int'(wdata);
      end
      for (int a = IMG_PIX; a < 1024; a += 7) begin
        @(negedge clk);
        we = 1'b1; addr = 10'(a); wdata = pixel_t'($urandom);
      end
      @(negedge clk);
      we = 1'b0;
      for (int l = IMG_LINES - 1; l >= 0; l--) begin
        rd_line = 5'(l);
        #1;
        for (int j = 0; j < LINE_PIX; j++) begin
          checks++;
          if (int'(line_pix[j]) != model[l * LINE_PIX + j]) begin
            failures++; $display("line %0d pixel %0d: %0d, expected %0d", l, j, line_pix[j], model[l * LINE_PIX + j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
