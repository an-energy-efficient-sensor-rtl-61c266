// i2c_sensor_model: behavioural I2C sensor for the system testbenches.
//
// Answers at 7-bit address ADDR. Each read byte is the next reading of a
// slowly varying signal (a bounded random walk); every reading handed out is
// also appended to the queue readings for the testbench to compare. Written
// bytes are acknowledged and ignored. START and STOP are counted.
module i2c_sensor_model #(
  parameter logic [6:0] ADDR = 7'h48
) (
  input  logic scl,
  input  logic sda,
  output logic sda_oe
);
  int readings[$];
  int n_start = 0, n_stop = 0;
  int level = 120;

  always @(negedge sda) if (scl) n_start++;
  always @(posedge sda) if (scl) n_stop++;

  function automatic int next_reading();
    level = level + int'($urandom_range(0, 4)) - 2;
    if (level < 0) level = 0;
    if (level > 255) level = 255;
    return level;
  endfunction

  task automatic get_byte(output logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      @(posedge scl); b = {b[6:0], sda};
    end
  endtask

  initial begin
    logic [7:0] a, d;
    bit more;
    sda_oe = 1'b0;
    forever begin
      @(negedge sda iff scl);
      get_byte(a);
      if (a[7:1] != ADDR) continue;
      @(negedge scl); #1 sda_oe = 1'b1;
      @(negedge scl); #1 sda_oe = 1'b0;
      if (!a[0]) begin
        get_byte(d);
        @(negedge scl); #1 sda_oe = 1'b1;
        @(negedge scl); #1 sda_oe = 1'b0;
      end else begin
        do begin
          d = 8'(next_reading());
          readings.push_back(int'(d));
          for (int i = 7; i >= 0; i--) begin
            sda_oe = !d[i];
            @(negedge scl); #1;
          end
          sda_oe = 1'b0;
          @(posedge scl); more = !sda;
          @(negedge scl); #1;
        end while (more);
      end
    end
  end
endmodule
