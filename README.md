# Dual cellular-automaton image encryptor

This design encrypts a 128 × 128 grey-level image held in on-chip memory. It
uses two small cellular automata (CA), each clocked alongside the other:

* a **14-bit CA** whose state is used as the *address* at which each pixel is
  stored, which scrambles pixel positions;
* an **8-bit CA** whose state is a *key byte* combined with the pixel value.

Two encrypted copies are produced at the same time. Image 1 holds
`pixel XOR key` and image 2 holds `pixel XNOR key`. Both copies go to the same
scrambled address, each in its own 16 KiB RAM. The key is the pair of seeds:
any of the 2^14 − 1 non-zero 14-bit seeds selects a different scrambling
order, and the 8-bit seed selects the phase of the key stream.

One image takes 3 clocks per pixel: 3 × 16384 = 49,152 clocks, or 0.98 ms at
50 MHz.

## The cellular automata

Both automata are one-dimensional arrays of flip-flops. Each clock, every
cell takes a new value from its neighbours under one of two rules:

| rule | next value of cell *i* |
|------|------------------------|
| 90   | s(i−1) ⊕ s(i+1)          |
| 150  | s(i−1) ⊕ s(i) ⊕ s(i+1)   |

The cells at the two ends see a constant 0 beyond the edge (null boundary).
Each cell's rule is fixed in hardware:

| CA | cells 1 → N |
|----|-------------|
| 14-bit (`ca14`) | 90, 150, 150, 150, 150, 150, 90, 150, 150, 150, 150, 150, 150, 90 |
| 8-bit (`ca8`)   | 90, 90, 150, 90, 150, 90, 150, 90 |

Both rule sets are *maximal length*. From any non-zero seed, the 14-bit CA
passes through all 16,383 non-zero states before it repeats, and the 8-bit
CA through all 255 non-zero bytes. The testbenches check both periods. The
all-zero state is a fixed point, so a zero seed is replaced by 1 when it is
loaded.

In the RTL a whole generation is one expression. Cell 1 is bit 0, so the left
neighbour of bit *i* is bit *i−1*:

```
next = (state << 1) ^ (state >> 1) ^ (state & RULE150)
```

The shifts shift in zeros at both ends, which gives the null boundary.
`RULE150` has a 1 for every rule-150 cell (`dca_pkg::CA14_RULE150`,
`dca_pkg::CA8_RULE150`).

## Why the scrambling is a permutation

The pixels are read in row order: index *k* = row·128 + column, for k = 0 … 16383.
Pixel *k* is written at the address the 14-bit CA holds after k+1 steps. These
first 16,383 addresses are the CA's 16,383 non-zero states, each exactly
once, so no pixel overwrites another. The image has one pixel more than the CA
has states. The last pixel (k = 16383) is therefore written to address 0, the
one address the CA never produces. Every RAM location is written exactly once.

To decrypt, run the same two automata from the same seeds. For each *k*,
read the byte at the k-th address and XOR it with the k-th key byte. For
image 2, invert the byte first. There is no decryption hardware here; the
testbenches decrypt in software.

## Pixel timing

The controller (`encrypt_ctrl`) spends exactly three clocks on every pixel:

| clock | state    | action |
|-------|----------|--------|
| 1     | `S_GEN`  | both CAs step once (`ca_step`) |
| 2     | `S_ADDR` | the new 14-bit CA value (or 0 for the last pixel) is latched into the RAM address registers `addr`/`addr1`; the secret-image RAM is read at index *k* |
| 3     | `S_ENC`  | the pixel is XORed / XNORed with the 8-bit CA value and written to both RAMs (`ram_we`); *k* advances |

While `S_IDLE` the CAs are held loaded with `seed14`/`seed8`. The `encrypt`
input is a switch. It passes through a two-flip-flop synchroniser, and the run
starts three clocks after the switch reads 1. `busy` is high for exactly
49,152 clocks. `done` then stays high until the switch returns to 0, which
sends the controller back to idle and reloads the seeds. Opening the switch
during a run does not stop that run.

## Block structure

```
              img_we/waddr/wdata                      rd_addr
                    │                                    │
              ┌─────▼──────────┐  pixel   ┌──────────┐  ┌▼────────────────┐
  pix_raddr ─►│secret_image_mem├─────────►│          ├─►│ enc_image_ram 1 ├─► rd_data_xor
              └────────────────┘          │  pixel_  │  │ (XOR image)     │
 ┌──────────┐        ca8 state (key) ────►│  cipher  │  └─────────────────┘
 │encrypt_  │ step/load ┌──────┐          │          │  ┌─────────────────┐
 │ctrl      ├──────────►│ ca8  │          │          ├─►│ enc_image_ram 2 ├─► rd_data_xnor
 │          ├──────────►│ ca14 ├─state──► └──────────┘  │ (XNOR image)    │
 │          │◄──────────┴──────┘                        └─────────────────┘
 │          ├──── ram_we, addr, addr1 ──────────────────► both RAMs
 └──────────┘
```

| file | contents |
|------|----------|
| `rtl/dca_pkg.sv` | image size, widths, the two rule masks, controller state type |
| `rtl/ca14.sv` | 14-cell shuffler CA with seed load |
| `rtl/ca8.sv` | 8-cell key CA with seed load |
| `rtl/pixel_cipher.sv` | XOR and XNOR of pixel and key (combinational) |
| `rtl/secret_image_mem.sv` | 16384 × 8 RAM for the input image, load port + registered read |
| `rtl/enc_image_ram.sv` | 16384 × 8 RAM for one encrypted image, write port + independent registered read-back port |
| `rtl/encrypt_ctrl.sv` | switch synchroniser and three-clock-per-pixel sequencer |
| `rtl/dual_ca_encryptor.sv` | top level |

### Top-level ports (`dual_ca_encryptor`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock (50 MHz intended), asynchronous active-low reset |
| `encrypt` | in | 1 | switch; 1 starts a run |
| `seed14`, `seed8` | in | 14, 8 | key; sampled while idle |
| `img_we`, `img_waddr`, `img_wdata` | in | 1, 14, 8 | load the secret image (row order) |
| `rd_addr` | in | 14 | read-back address for both encrypted images |
| `rd_data_xor`, `rd_data_xnor` | out | 8 | encrypted bytes, one clock after `rd_addr` |
| `busy`, `done` | out | 1 | run in progress / finished |

Memory: 3 × 131,072 bits. The two encrypted-image RAMs take 262,144 bits.
The secret-image RAM takes another 131,072.

## What is fixed and what was chosen

These points follow the published design: the two rule sequences, the
14-bit and 8-bit widths, the 128 × 128 × 8-bit image, the XOR image and the
XNOR image written to two separate 16384-byte memories at the same address,
three clocks per pixel in the order step / address / encrypt-and-write, the
two address registers, the `encrypt` switch and the 50 MHz clock.

These were chosen for this implementation:

* **Null boundary and bit order.** Cell 1 is bit 0, and the cells beyond
  both ends are constant 0. With this reading both rule sets are
  maximal-length.
* **Loadable secret image.** In the original, the image appears to have been
  compiled into logic, because its reported logic usage changes from image to
  image. Here it sits in a RAM with a load port.
* **Seed ports and zero-seed guard.** The 14-bit seed is the key. How the
  seeds were entered on the original board is not described.
* **Read-back port.** The original read the RAMs out over JTAG with a vendor
  memory editor. Here they have a second, plain read port.
* **Last pixel at address 0.** This makes the scrambling a full permutation
  of all 16384 positions.
* **Control details.** These are the synchroniser, the `busy`/`done`
  handshake, the return-to-idle rule, the asynchronous reset (CAs reset to 1),
  and reading the secret pixel in clock 2.
* **One CA step per pixel.** One passage of the original says that the CAs make
  new numbers every clock. Here they step once per pixel, in its first clock,
  as its detailed timing describes.

The original reports 230 registers. This RTL has 57 flip-flops outside the
RAMs after synthesis; how the 230 were used is not described. Only the
encryption datapath is given here. There is no decryption circuit and no
interface to a particular board.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_ca14`, `tb_ca8` | every state against a cell-by-cell model built from the rule list; reset, load priority, zero seed, hold when `step=0`; full period and every non-zero state visited once |
| `tb_pixel_cipher` | all 65,536 pixel/key pairs, and that applying the key twice gives the pixel back |
| `tb_secret_image_mem`, `tb_enc_image_ram` | fill, read back every location with its one-clock latency, random overwrites against a shadow copy |
| `tb_encrypt_ctrl` | a full 16384-pixel run with a stand-in CA: step → address → write on consecutive clocks, sequential pixel index, addresses, address 0 for the last pixel, `busy` = 49,152 clocks, `done`/idle behaviour, switch opened mid-run |
| `tb_dual_ca_encryptor` | the whole design at full size, no parameter overrides: three complete encryptions of a synthetic image (chosen seeds, a different 14-bit seed with the switch opened mid-run, zero seeds). Each byte of both images is checked against a reference model, then decrypted back to the original. It also counts that each mechanism occurred |
| `tb_image_workloads` | five 128 × 128 images with different statistics. It reports MSE, PSNR and the histogram of the encrypted images, and requires PSNR < 12 dB and a nearly flat histogram |

Typical results from `tb_image_workloads` are PSNR between 6 and 10 dB
between original and encrypted image, with all 256 grey levels in use. For
128 × 128 photographs, the published measurements for this cipher lie
between about 7.8 and 9.3 dB.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl --top-module tb_dual_ca_encryptor \
    rtl/dca_pkg.sv tb/tb_dual_ca_encryptor.sv
./obj_dir/Vtb_dual_ca_encryptor
```

The package must come first on the command line; `-Irtl` lets Verilator find
every module in its own file. Each testbench runs in well under a second.

## Changing the design

* Other rule sets: change `CA14_RULE150` / `CA8_RULE150` in `dca_pkg`, or
  override the `RULE150` parameter of `ca14` / `ca8`. Only maximal-length
  rule vectors keep the scrambling a permutation. `tb_ca14` checks the period
  and shows how to test a new vector.
* Another image size: `NPIX`, `ADDR_W` and the shuffler width must agree
  (NPIX = 2^ADDR_W). The shuffler must be a maximal-length CA of ADDR_W cells.
