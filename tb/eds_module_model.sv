// eds_module_model: behavioural model of a module's data sheet device, the I2C
// slave a module exposes on its probe pins. Not synthesizable.
//
// When `present` is high it answers reads at ADDR: it sends data[0], data[1], ...
// while the master acknowledges, starting from data[0] at each new read. It
// does not answer writes. scl and sda are the resolved line levels of the pair it
// is plugged into; sda_oe = 1 pulls SDA low.
module eds_module_model #(
  parameter logic [6:0] ADDR  = 7'h20,
  parameter int         NDATA = 11
) (
  input  logic       present,
  input  logic [7:0] data [NDATA],
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe
);

  logic [7:0] a;
  bit         mack;
  int         idx;

  initial begin
    sda_oe = 1'b0;
    forever begin
      @(negedge sda iff scl);                  // START
      for (int i = 7; i >= 0; i--) begin
        @(posedge scl) a[i] = sda;
      end
      @(negedge scl);
      if (present && a[7:1] == ADDR && a[0]) begin
        #1 sda_oe = 1'b1;                      // address ACK
        @(negedge scl);
        idx = 0;
        do begin
          for (int i = 7; i >= 0; i--) begin
            #1 sda_oe = !data[idx % NDATA][i];
            @(negedge scl);
          end
          #1 sda_oe = 1'b0;
          @(posedge scl) mack = !sda;
          @(negedge scl);
          idx++;
        end while (mack);
      end
    end
  end

endmodule
