// i2c_bfm: I2C controller model for testbenches.
//
// Drives SCL and pulls SDA low (open drain); the bus line itself is formed
// by the testbench as sda = ~(sda_pull | target_sda_oe). Tasks:
//   write_regs(dev, ptr, n, data)  pointer byte, then n data bytes
//   read_regs (dev, ptr, n, data)  pointer write, repeated START, n reads
//   probe(dev, acked)              address byte only, reports the ACK bit
// HALF is the SCL half period in time units of the caller's timescale.
module i2c_bfm #(
  parameter int HALF = 50
) (
  output logic scl,
  output logic sda_pull,
  input  logic sda
);

  logic last_ack;

  initial begin
    scl      = 1'b1;
    sda_pull = 1'b0;
    last_ack = 1'b0;
  end

  task automatic start_c();
    sda_pull = 1'b0; #(HALF);
    scl = 1'b1;      #(HALF);
    sda_pull = 1'b1; #(HALF);
    scl = 1'b0;      #(HALF);
  endtask

  task automatic stop_c();
    sda_pull = 1'b1; #(HALF);
    scl = 1'b1;      #(HALF);
    sda_pull = 1'b0; #(HALF);
  endtask

  task automatic send_byte(input logic [7:0] b);
    for (int i = 7; i >= 0; i--) begin
      sda_pull = ~b[i]; #(HALF);
      scl = 1'b1;       #(HALF);
      scl = 1'b0;
    end
    sda_pull = 1'b0; #(HALF);
    scl = 1'b1;      #(HALF/2);
    last_ack = ~sda; #(HALF/2);
    scl = 1'b0;
  endtask

  task automatic recv_byte(output logic [7:0] b, input logic ack);
    sda_pull = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      #(HALF);
      scl = 1'b1; #(HALF/2);
      b[i] = sda; #(HALF/2);
      scl = 1'b0;
    end
    sda_pull = ack; #(HALF);
    scl = 1'b1;     #(HALF);
    scl = 1'b0;
    sda_pull = 1'b0;
  endtask

  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr,
                            input int n, input logic [7:0] data [16], output logic ok);
    ok = 1'b1;
    start_c();
    send_byte({dev, 1'b0}); ok &= last_ack;
    send_byte(ptr);         ok &= last_ack;
    for (int i = 0; i < n; i++) begin
      send_byte(data[i]);   ok &= last_ack;
    end
    stop_c();
  endtask

  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr,
                           input int n, output logic [7:0] data [16], output logic ok);
    ok = 1'b1;
    start_c();
    send_byte({dev, 1'b0}); ok &= last_ack;
    send_byte(ptr);         ok &= last_ack;
    start_c();
    send_byte({dev, 1'b1}); ok &= last_ack;
    for (int i = 0; i < n; i++) recv_byte(data[i], i != n - 1);
    stop_c();
  endtask

  task automatic probe(input logic [6:0] dev, output logic acked);
    start_c();
    send_byte({dev, 1'b0});
    acked = last_ack;
    stop_c();
  endtask

endmodule
